// Depuncturer: rebuilds (X,Y) code pairs from the received stream of soft
// bits (SOFT_W-bit confidence values).
//
// It walks through the same puncture codes as the transmitter (10 for X,
// 11 for Y by default). For each pair of a group it takes the next received
// bit as X if X was sent and as Y if Y was sent; a position that was deleted
// is filled with a null symbol, flagged as erased so the Viterbi decoder
// gives it no weight. With the defaults this inserts a null after every
// other X. In RATE_1_2 every pair takes two received bits. The rate is
// sampled at the start of each group, as in the puncturer.
// Interface: soft bit with in_valid in; code_pair_t with pair_valid out (one
// cycle), registered, the cycle after the bit that completes the pair.
// The depuncture codes and null insertion follow the link description;
// erasure flags as the form of the null symbol are this design's choice.
module depuncturer
  import sdr_pkg::*;
#(
  parameter int unsigned       PERIOD = 2,
  parameter logic [PERIOD-1:0] PAT_X  = 2'b10,
  parameter logic [PERIOD-1:0] PAT_Y  = 2'b11
) (
  input  logic       clk,
  input  logic       rst_n,
  input  rate_e      rate,
  input  logic [SOFT_W-1:0] in_soft,
  input  logic       in_valid,
  output code_pair_t pair,
  output logic       pair_valid
);

  localparam int unsigned PW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [PW-1:0] phase;
  rate_e         grp_rate, use_rate;
  logic          keep_x, keep_y;
  logic          got_x;      // X of the current pair already received
  logic [SOFT_W-1:0] x_q;
  logic          need_x;     // next bit belongs to X

  assign use_rate = (phase == '0 && !got_x) ? rate : grp_rate;
  assign keep_x   = (use_rate == RATE_1_2) || PAT_X[PERIOD-1-phase];
  assign keep_y   = (use_rate == RATE_1_2) || PAT_Y[PERIOD-1-phase];
  assign need_x   = keep_x && !got_x;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= '0;
      grp_rate   <= RATE_2_3;
      got_x      <= 1'b0;
      x_q        <= '0;
      pair       <= '0;
      pair_valid <= 1'b0;
    end else begin
      pair_valid <= 1'b0;
      if (!keep_x && !keep_y) begin
        // Both deleted: the pair is made of nulls only.
        pair       <= '{x: '0, y: '0, x_erased: 1'b1, y_erased: 1'b1};
        pair_valid <= 1'b1;
        grp_rate   <= use_rate;
        phase      <= (phase == PW'(PERIOD - 1)) ? '0 : phase + 1'b1;
      end else if (in_valid) begin
        grp_rate <= use_rate;
        if (need_x && keep_y) begin
          x_q   <= in_soft;
          got_x <= 1'b1;
        end else begin
          pair.x        <= need_x ? in_soft : (keep_x ? x_q : '0);
          pair.x_erased <= !keep_x;
          pair.y        <= keep_y ? in_soft : '0;
          pair.y_erased <= !keep_y;
          pair_valid    <= 1'b1;
          got_x         <= 1'b0;
          phase         <= (phase == PW'(PERIOD - 1)) ? '0 : phase + 1'b1;
        end
      end
    end
  end

endmodule
