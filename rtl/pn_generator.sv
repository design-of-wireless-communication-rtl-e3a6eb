// PN sequence generator for spreading and despreading.
//
// A Fibonacci linear-feedback shift register of LEN stages: the output chip
// is the last stage, the feedback is the parity of the stages selected by
// TAPS, and the register advances only when en is high. With the default
// polynomial x^5 + x^3 + 1 the sequence is a maximal-length one of period
// 31. Transmitter and receiver each hold one, started from the same SEED at
// reset and advanced once per chip, so their sequences stay aligned.
// Interface: en advances the register at the clock edge; chip shows the
// current chip combinationally from the register.
// The spreading gain comes from the link description; the polynomial,
// length and seed are this design's choice.
module pn_generator #(
  parameter int unsigned    LEN  = 5,
  parameter logic [LEN-1:0] TAPS = 5'b01001,   // x^5 + x^3 + 1
  parameter logic [LEN-1:0] SEED = 5'b00001
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic chip
);

  logic [LEN-1:0] lfsr;

  assign chip = lfsr[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  lfsr <= SEED;
    else if (en) lfsr <= {^(lfsr & TAPS), lfsr[LEN-1:1]};
  end

endmodule
