// Serial-to-parallel converter at the receiver output.
//
// Decoded bits are collected, first bit into the most significant position,
// and every W bits the word is presented for one cycle with word_valid.
// This mirrors the transmitter's serializer, so the source words come back
// unchanged.
// Interface: bit with in_valid in (no back-pressure); word with word_valid
// out, registered, the cycle after the word's last bit.
// The grouping follows the link description; word width and order are this
// design's choices (the same as the serializer's).
module bit_deserializer #(
  parameter int unsigned W = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_bit,
  input  logic         in_valid,
  output logic [W-1:0] word,
  output logic         word_valid
);

  localparam int unsigned CW = (W > 1) ? $clog2(W) : 1;

  logic [W-2:0]  shreg;    // bits received so far, W >= 2
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg      <= '0;
      cnt        <= '0;
      word       <= '0;
      word_valid <= 1'b0;
    end else begin
      word_valid <= 1'b0;
      if (in_valid) begin
        if (cnt == CW'(W - 1)) begin
          word       <= {shreg, in_bit};
          word_valid <= 1'b1;
          cnt        <= '0;
        end else begin
          shreg <= (W-1)'({shreg, in_bit});
          cnt   <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
