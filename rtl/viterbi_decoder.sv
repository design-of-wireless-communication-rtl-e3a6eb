// Viterbi decoder for the rate 1/2, K=7 (171,133) code, with a Hamming or
// a Euclidean branch metric and a trace-back survivor memory.
//
// Step 1, path metrics. Each input pair is one trellis step over the 64
// encoder states. Received bits are SOFT_W-bit confidence values (0 = sure
// 0, 7 = sure 1). With METRIC_HAMMING the branch metric is the Hamming
// distance between the hard decisions (top bits) and the bits a branch
// would produce. With METRIC_EUCLIDEAN it is the distance of each soft value
// to the branch's ideal level (v for a 0, 7 - v for a 1), which for
// equal-energy symbols ranks paths as the squared Euclidean distance does.
// An erased (depunctured) bit adds nothing. All 64 add-compare-select operations run
// in one cycle: state s' = {u, s[5:1]} is reached from {s'[4:0],0} and
// {s'[4:0],1} and keeps the smaller sum (the first on a tie). Each step
// subtracts the smallest old metric so the metrics stay small. The 64
// decision bits of a step (1 = the second predecessor won) are written to a
// circular decision memory; beside them is written the state with the
// smallest metric after that step.
// Step 2, trace back. Once DEPTH+BLOCK+1 undecoded steps are stored, the
// trace-back unit starts at step f+DEPTH+BLOCK-1 (f = oldest undecoded step)
// from the best state stored for it and walks back one step per clock,
// state <- {state[4:0], decision[state]}, reading one memory word per clock.
// The input bit of each visited step is the state's top bit; the last BLOCK
// visited (steps f+BLOCK-1 down to f) are the decisions, each made at least
// DEPTH steps after its own step. They are sent oldest first, one per clock,
// and f advances by BLOCK. One trace back takes DEPTH+BLOCK clocks, so the
// decoder keeps up with inputs that average at least (DEPTH+BLOCK)/BLOCK = 7
// clocks apart (the link delivers one every 12 or 16); short bursts are
// absorbed by the memory. An assertion flags a memory overflow.
// Interface: code_pair_t with in_valid in; decoded bit with out_valid out.
// A bit leaves between DEPTH+BLOCK+1 and about 2*(DEPTH+BLOCK) steps after
// its own step, depending on where it falls in a block. Reset starts the
// trellis in state 0, the encoder's reset state.
// Code, the choice of Hamming or Euclidean metric, the two-step method and
// the trace-back length of 48 follow the link description; the soft value
// format, the block size, memory depth, metric width and the
// start-from-best-state rule are this design's choices.
module viterbi_decoder
  import sdr_pkg::*;
#(
  parameter metric_e     METRIC = METRIC_HAMMING,
  parameter int unsigned DEPTH = TB_LEN,
  parameter int unsigned BLOCK = 8,
  parameter int unsigned MEM_AW = 7,     // decision memory of 2**MEM_AW steps
  parameter int unsigned MW    = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  code_pair_t pair,
  input  logic       in_valid,
  output logic       out_bit,
  output logic       out_valid
);

  localparam int unsigned SW     = K - 1;
  localparam int unsigned TBL    = DEPTH + BLOCK;        // steps per trace back
  localparam int unsigned BW     = (BLOCK > 1) ? $clog2(BLOCK) : 1;
  localparam int unsigned CW     = $clog2(TBL + 1);
  localparam logic [MW-1:0] INIT_M = MW'(4 * K);         // start bias of states != 0
  localparam int unsigned BMW    = SOFT_W + 1;           // branch metric width
  localparam logic [SOFT_W-1:0] VMAX = '1;

  // Cost of receiving v when the branch sends e.
  function automatic logic [SOFT_W-1:0] bit_cost(input logic [SOFT_W-1:0] v, input logic e,
                                                 input logic erased);
    if (erased)                       return '0;
    else if (METRIC == METRIC_HAMMING) return SOFT_W'(v[SOFT_W-1] != e);
    else                              return e ? VMAX - v : v;
  endfunction

  typedef logic [MEM_AW-1:0] addr_t;

  // ---------------- path metrics ----------------
  logic [MW-1:0]      metric   [NSTATES];
  logic [MW-1:0]      metric_n [NSTATES];
  logic [NSTATES-1:0] dec_n;
  logic [MW-1:0]      min_m;
  logic [SW-1:0]      best;

  // Smallest metric and its state (lowest index on a tie).
  always_comb begin
    min_m = metric[0];
    best  = '0;
    for (int s = 1; s < NSTATES; s++) begin
      if (metric[s] < min_m) begin
        min_m = metric[s];
        best  = SW'(s);
      end
    end
  end

  // Branch metrics and add-compare-select for all states.
  always_comb begin
    for (int ns = 0; ns < NSTATES; ns++) begin
      logic [SW-1:0] p0, p1;
      logic [1:0]    e0, e1;
      logic          u;
      logic [BMW-1:0] bm0, bm1;
      logic [MW-1:0] m0, m1;
      u   = ns[SW-1];
      p0  = {ns[SW-2:0], 1'b0};
      p1  = {ns[SW-2:0], 1'b1};
      e0  = conv_out(u, p0);
      e1  = conv_out(u, p1);
      bm0 = BMW'(bit_cost(pair.x, e0[1], pair.x_erased)) + BMW'(bit_cost(pair.y, e0[0], pair.y_erased));
      bm1 = BMW'(bit_cost(pair.x, e1[1], pair.x_erased)) + BMW'(bit_cost(pair.y, e1[0], pair.y_erased));
      m0  = metric[p0] - min_m + MW'(bm0);
      m1  = metric[p1] - min_m + MW'(bm1);
      dec_n[ns]    = (m1 < m0);
      metric_n[ns] = (m1 < m0) ? m1 : m0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NSTATES; s++) metric[s] <= (s == 0) ? '0 : INIT_M;
    end else if (in_valid) begin
      metric <= metric_n;
    end
  end

  // ---------------- survivor memory ----------------
  // dmem[n]: decisions of step n; bmem[n]: best state after step n. The
  // best state of step n is known once step n+1 arrives (it is the argmin
  // of the metrics then held), so it is written one step late.
  logic [NSTATES-1:0] dmem [2**MEM_AW];
  logic [SW-1:0]      bmem [2**MEM_AW];
  addr_t              wp;          // next step to write
  addr_t              first;       // oldest step not yet decoded
  logic               started;     // at least one step written
  addr_t              raddr;
  logic [NSTATES-1:0] rd_dec;
  logic [SW-1:0]      rd_best;
  logic [MEM_AW:0]    stored;      // steps whose best state is known, not yet decoded

  always_ff @(posedge clk) begin
    if (in_valid) begin
      dmem[wp] <= dec_n;
      if (started) bmem[wp - 1'b1] <= best;
    end
    rd_dec  <= dmem[raddr];
    rd_best <= bmem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp      <= '0;
      started <= 1'b0;
    end else if (in_valid) begin
      wp      <= wp + 1'b1;
      started <= 1'b1;
    end
  end

  assign stored = started ? (MEM_AW+1)'(addr_t'(wp - 1'b1 - first)) : '0;

  // ---------------- trace back ----------------
  typedef enum logic [1:0] {TB_IDLE, TB_LOAD, TB_RUN} tb_state_e;
  tb_state_e         tb_st;
  addr_t             step;         // step whose decisions are in rd_dec
  logic [SW-1:0]     st;           // trellis state after that step
  logic [SW-1:0]     st_cur;
  logic [CW-1:0]     cnt;          // steps visited in this trace back
  logic [BLOCK-1:0]  obuf;         // decisions of the block, bit k = step first+k
  logic [BLOCK-1:0]  oshift;       // block being sent
  logic [BW:0]       oleft;        // bits of oshift still to send

  assign st_cur = (tb_st == TB_LOAD) ? rd_best : st;

  always_comb begin
    // the word needed in the next clock: the start step, or the step before
    raddr = (tb_st == TB_IDLE) ? first + addr_t'(TBL - 1) : step - 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tb_st     <= TB_IDLE;
      step      <= '0;
      st        <= '0;
      cnt       <= '0;
      first     <= '0;
      obuf      <= '0;
      oshift    <= '0;
      oleft     <= '0;
      out_bit   <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      // sender: one decoded bit per clock, oldest first
      out_valid <= 1'b0;
      if (oleft != '0) begin
        out_bit   <= oshift[0];
        out_valid <= 1'b1;
        oshift    <= oshift >> 1;
        oleft     <= oleft - 1'b1;
      end

      case (tb_st)
        TB_IDLE: begin
          // bmem of the start step is written once a later step arrives
          if (stored >= (MEM_AW+1)'(TBL)) begin
            step  <= first + addr_t'(TBL - 1);
            cnt   <= '0;
            tb_st <= TB_LOAD;
          end
        end
        TB_LOAD, TB_RUN: begin
          // rd_dec holds the decisions of 'step', st_cur the state after it
          if (cnt >= CW'(DEPTH))
            obuf[BW'(TBL - 1 - cnt)] <= st_cur[SW-1];
          st    <= {st_cur[SW-2:0], rd_dec[st_cur]};
          step  <= step - 1'b1;
          cnt   <= cnt + 1'b1;
          tb_st <= TB_RUN;
          if (cnt == CW'(TBL - 1)) begin
            tb_st  <= TB_IDLE;
            first  <= first + addr_t'(BLOCK);
            oshift <= obuf;
            oshift[0] <= st_cur[SW-1];
            oleft  <= (BW+1)'(BLOCK);
          end
        end
        default: tb_st <= TB_IDLE;
      endcase
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (stored < (MEM_AW+1)'(2**MEM_AW - 2)));

endmodule
