// Rate 1/2 convolutional encoder, constraint length 7, generators 171 and
// 133 (octal).
//
// A six-bit shift register holds the previous inputs. For each input bit u
// the two code bits are the modulo-2 sums X = parity({u,state} & 171) and
// Y = parity({u,state} & 133), where the leftmost generator tap is the
// current input; then u is shifted in. Reset clears the register, so every
// stream starts in the all-zero state.
// Interface: vin/in_ready accept one data bit; vout marks a valid (x,y)
// pair, held until out_ready. One-cycle latency, one bit per clock.
// The code and the Vin/Vout signalling follow the link description; the
// ready signals that let the chain stall are this design's addition.
module conv_encoder
  import sdr_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  input  logic vin,
  output logic in_ready,
  output logic x,
  output logic y,
  output logic vout,
  input  logic out_ready
);

  logic [K-2:0] state;   // state[K-2] is the most recent input

  assign in_ready = !vout || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
      x     <= 1'b0;
      y     <= 1'b0;
      vout  <= 1'b0;
    end else begin
      if (vout && out_ready) vout <= 1'b0;
      if (vin && in_ready) begin
        {x, y} <= conv_out(din, state);
        state  <= {din, state[K-2:1]};
        vout   <= 1'b1;
      end
    end
  end

endmodule
