// Puncturer: turns the rate 1/2 encoder output into a rate 2/3 bit stream.
//
// Encoder pairs (X,Y) are taken in groups of PERIOD. The puncture codes
// PAT_X and PAT_Y say, per pair of the group (most significant bit first),
// whether X and Y are sent: the defaults 10 and 11 drop every second X, so
// two pairs X0 Y0 X1 Y1 leave as the three bits X0 Y0 Y1. With rate set to
// RATE_1_2 every bit is sent (X then Y). A change of rate takes effect at
// the next group boundary, so a group is never split between two codes.
// Interface: valid/ready pair input, valid/ready serial bit output. A pair
// is held in a register and its kept bits leave one per cycle.
// The puncture codes and their meaning follow the link description; the
// run-time rate switch and the X-before-Y bit order are this design's own.
module puncturer
  import sdr_pkg::*;
#(
  parameter int unsigned     PERIOD = 2,
  parameter logic [PERIOD-1:0] PAT_X = 2'b10,
  parameter logic [PERIOD-1:0] PAT_Y = 2'b11
) (
  input  logic  clk,
  input  logic  rst_n,
  input  rate_e rate,
  input  logic  x,
  input  logic  y,
  input  logic  in_valid,
  output logic  in_ready,
  output logic  out_bit,
  output logic  out_valid,
  input  logic  out_ready
);

  localparam int unsigned PW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [PW-1:0] phase;       // position of the next pair in its group
  rate_e         grp_rate;    // rate of the group in progress
  rate_e         use_rate;
  logic          x_q, y_q;
  logic          pend_x, pend_y;
  logic          keep_x, keep_y;
  logic          last_pending;

  // Rate switches only at the start of a group.
  assign use_rate = (phase == '0) ? rate : grp_rate;
  assign keep_x   = (use_rate == RATE_1_2) || PAT_X[PERIOD-1-phase];
  assign keep_y   = (use_rate == RATE_1_2) || PAT_Y[PERIOD-1-phase];

  assign out_valid    = pend_x || pend_y;
  assign out_bit      = pend_x ? x_q : y_q;
  assign last_pending = (pend_x ^ pend_y);
  assign in_ready     = !out_valid || (last_pending && out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= '0;
      grp_rate <= RATE_2_3;
      x_q      <= 1'b0;
      y_q      <= 1'b0;
      pend_x   <= 1'b0;
      pend_y   <= 1'b0;
    end else if (in_valid && in_ready) begin
      x_q      <= x;
      y_q      <= y;
      pend_x   <= keep_x;
      pend_y   <= keep_y;
      grp_rate <= use_rate;
      phase    <= (phase == PW'(PERIOD - 1)) ? '0 : phase + 1'b1;
    end else if (out_valid && out_ready) begin
      if (pend_x) pend_x <= 1'b0;
      else        pend_y <= 1'b0;
    end
  end

endmodule
