// Direct-sequence spreader: each QPSK symbol becomes SF chips.
//
// A symbol is held for SF chip periods. In every period both of its sign
// bits are XORed with the same PN chip and the results are sent as signed
// samples, +CHIP_AMP for 0 and -CHIP_AMP for 1, on the I and Q outputs. The
// PN generator advances once per sent chip, so it only moves while chips
// flow. The next symbol is taken during the last chip of the current one;
// with a steady supply the chip stream has no gaps.
// Interface: valid/ready symbol input; chip samples with chip_valid, no
// back-pressure (the output runs at the chip rate of the converter).
// Timing: the first chip of a symbol appears the cycle after it is taken.
// The spreading gain of 16 follows the link description; spreading I and Q
// with one shared PN chip and the sample format are this design's choices.
module spreader
  import sdr_pkg::*;
#(
  parameter int unsigned SPREAD = SF
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  qpsk_sym_t                  sym,
  input  logic                       sym_valid,
  output logic                       sym_ready,
  output logic signed [SAMPLE_W-1:0] chip_i,
  output logic signed [SAMPLE_W-1:0] chip_q,
  output logic                       chip_valid,
  output logic                       pn_chip
);

  localparam int unsigned CW = $clog2(SPREAD);
  localparam logic signed [SAMPLE_W-1:0] APOS = SAMPLE_W'(CHIP_AMP);
  localparam logic signed [SAMPLE_W-1:0] ANEG = -SAMPLE_W'(CHIP_AMP);

  qpsk_sym_t   sym_q;
  logic        active;
  logic [CW-1:0] cnt;       // chip index within the symbol

  pn_generator u_pn (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (active),
    .chip (pn_chip)
  );

  assign sym_ready  = !active || (cnt == CW'(SPREAD - 1));
  assign chip_valid = active;
  assign chip_i     = (sym_q.i ^ pn_chip) ? ANEG : APOS;
  assign chip_q     = (sym_q.q ^ pn_chip) ? ANEG : APOS;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_q  <= '0;
      active <= 1'b0;
      cnt    <= '0;
    end else if (sym_valid && sym_ready) begin
      sym_q  <= sym;
      active <= 1'b1;
      cnt    <= '0;
    end else if (active) begin
      if (cnt == CW'(SPREAD - 1)) active <= 1'b0;
      cnt <= cnt + 1'b1;
    end
  end

endmodule
