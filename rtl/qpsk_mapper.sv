// QPSK mapper: packs the punctured bit stream into QPSK symbols.
//
// Two consecutive bits form one symbol: the first selects the sign of the
// in-phase component, the second the sign of the quadrature component
// (0 -> +A, 1 -> -A, a Gray mapping). The symbol is output as the two sign
// bits; the spreader turns them into signed chip samples.
// Interface: valid/ready serial bit input, valid/ready symbol output.
// A symbol is presented the cycle after its second bit is accepted.
// QPSK itself follows the link description; the bit-to-axis assignment and
// the sign convention are this design's choice.
module qpsk_mapper
  import sdr_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_bit,
  input  logic      in_valid,
  output logic      in_ready,
  output qpsk_sym_t sym,
  output logic      sym_valid,
  input  logic      sym_ready
);

  logic have_first;   // first bit of the pair is stored
  logic first_bit;

  assign in_ready = !sym_valid || sym_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_first <= 1'b0;
      first_bit  <= 1'b0;
      sym        <= '0;
      sym_valid  <= 1'b0;
    end else begin
      if (sym_valid && sym_ready) sym_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (!have_first) begin
          first_bit  <= in_bit;
          have_first <= 1'b1;
        end else begin
          sym        <= '{i: first_bit, q: in_bit};
          sym_valid  <= 1'b1;
          have_first <= 1'b0;
        end
      end
    end
  end

endmodule
