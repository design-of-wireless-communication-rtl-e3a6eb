// QPSK demapper: decisions on despread symbols, sent as a stream of soft
// bits.
//
// Each soft component is quantised to SOFT_W bits of confidence that the
// bit is 1 (the transmitter sends 1 as a negative level): q = 3 - floor(v /
// 2**STEP_LOG2), clipped to 0..7. With the default step of 128, a quarter of
// the noise-free despread amplitude (16 chips x 32), a clean symbol gives 0
// or 7 and values near zero give 3 or 4. The top bit of q is the hard
// decision (negative -> 1), also sent on out_bit. The I value leaves in the
// cycle after the symbol arrives and the Q value in the cycle after that,
// the order in which the mapper took the bits.
// Interface: soft symbol with sym_valid in; out_bit/out_soft with bit_valid
// out, no back-pressure. Symbols must be at least two cycles apart, which
// the despreader guarantees (one symbol per SF chips); an assertion checks
// it.
// QPSK demodulation follows the link description; the soft quantisation
// (used by the Euclidean metric of the decoder) and the sign convention are
// this design's choices.
module qpsk_demapper
  import sdr_pkg::*;
#(
  parameter int unsigned ACC_W     = 13,
  parameter int unsigned STEP_LOG2 = 7
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ACC_W-1:0] soft_i,
  input  logic signed [ACC_W-1:0] soft_q,
  input  logic                    sym_valid,
  output logic                    out_bit,
  output logic [SOFT_W-1:0]       out_soft,
  output logic                    bit_valid
);

  localparam int QMAX = (1 << SOFT_W) - 1;
  localparam int QMID = (1 << (SOFT_W - 1)) - 1;

  function automatic logic [SOFT_W-1:0] quant(input logic signed [ACC_W-1:0] v);
    logic signed [ACC_W-1:0] t;
    logic signed [ACC_W:0]   q;
    t = v >>> STEP_LOG2;
    q = (ACC_W+1)'(QMID) - (ACC_W+1)'(t);
    if (q < 0)                     return '0;
    else if (q > (ACC_W+1)'(QMAX)) return SOFT_W'(QMAX);
    else                           return SOFT_W'(q);
  endfunction

  logic              q_pending;
  logic [SOFT_W-1:0] q_soft;

  assign out_bit = out_soft[SOFT_W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_pending <= 1'b0;
      q_soft    <= '0;
      out_soft  <= '0;
      bit_valid <= 1'b0;
    end else if (sym_valid) begin
      out_soft  <= quant(soft_i);
      q_soft    <= quant(soft_q);
      bit_valid <= 1'b1;
      q_pending <= 1'b1;
    end else if (q_pending) begin
      out_soft  <= q_soft;
      bit_valid <= 1'b1;
      q_pending <= 1'b0;
    end else begin
      bit_valid <= 1'b0;
    end
  end

  a_symbol_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    sym_valid |-> !q_pending);

endmodule
