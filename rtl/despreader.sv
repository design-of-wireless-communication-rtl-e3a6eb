// Despreader: correlates received chip samples with the local PN sequence.
//
// Every valid chip sample is multiplied by +1 or -1 according to the local
// PN chip and added to an I and a Q accumulator. After SF chips the two sums
// are output as one soft QPSK symbol and the accumulators restart. The
// local PN generator advances once per valid chip; it starts from the same
// seed as the transmitter's, so chip timing is taken from chip_valid and no
// code acquisition is performed.
// Interface: chip samples with chip_valid in; soft symbol with sym_valid
// (one cycle) out, registered, one cycle after the last chip of the symbol.
// Despreading with gain 16 follows the link description; the accumulator
// widths and the absence of acquisition are this design's choices.
module despreader
  import sdr_pkg::*;
#(
  parameter int unsigned SPREAD = SF,
  parameter int unsigned ACC_W  = SAMPLE_W + $clog2(SF) + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [SAMPLE_W-1:0] chip_i,
  input  logic signed [SAMPLE_W-1:0] chip_q,
  input  logic                       chip_valid,
  output logic signed [ACC_W-1:0]    soft_i,
  output logic signed [ACC_W-1:0]    soft_q,
  output logic                       sym_valid
);

  localparam int unsigned CW = $clog2(SPREAD);

  logic                    pn;
  logic [CW-1:0]           cnt;
  logic signed [ACC_W-1:0] acc_i, acc_q;
  logic signed [ACC_W-1:0] ci, cq, sum_i, sum_q;

  pn_generator u_pn (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (chip_valid),
    .chip (pn)
  );

  always_comb begin
    ci    = ACC_W'(chip_i);
    cq    = ACC_W'(chip_q);
    sum_i = pn ? acc_i - ci : acc_i + ci;
    sum_q = pn ? acc_q - cq : acc_q + cq;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      acc_i     <= '0;
      acc_q     <= '0;
      soft_i    <= '0;
      soft_q    <= '0;
      sym_valid <= 1'b0;
    end else begin
      sym_valid <= 1'b0;
      if (chip_valid) begin
        cnt <= cnt + 1'b1;
        if (cnt == CW'(SPREAD - 1)) begin
          soft_i    <= sum_i;
          soft_q    <= sum_q;
          sym_valid <= 1'b1;
          acc_i     <= '0;
          acc_q     <= '0;
          cnt       <= '0;
        end else begin
          acc_i <= sum_i;
          acc_q <= sum_q;
        end
      end
    end
  end

endmodule
