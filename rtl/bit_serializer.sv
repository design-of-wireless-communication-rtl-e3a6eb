// Parallel-to-serial converter at the transmitter input.
//
// Each W-bit word from the data source is shifted out one bit per accepted
// handshake, most significant bit first, into the convolutional encoder.
// A new word is accepted in the same cycle the last bit of the previous one
// leaves, so a steady source keeps the bit stream gap-free.
// Interface: valid/ready on both sides (a transfer happens when both are
// high at a rising clock edge). Latency: the first bit of a word is
// presented one cycle after the word is accepted.
// The conversion itself follows the link description; the word width, the
// bit order and the handshake are this design's choices.
module bit_serializer #(
  parameter int unsigned W = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] in_word,
  input  logic         in_valid,
  output logic         in_ready,
  output logic         out_bit,
  output logic         out_valid,
  input  logic         out_ready
);

  logic [W-1:0]         shreg;
  logic [$clog2(W+1)-1:0] left;   // bits still to send

  assign out_valid = (left != '0);
  assign out_bit   = shreg[W-1];
  assign in_ready  = (left == '0) || (left == 1 && out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
      left  <= '0;
    end else if (in_valid && in_ready) begin
      shreg <= in_word;
      left  <= W[$clog2(W+1)-1:0];
    end else if (out_valid && out_ready) begin
      shreg <= shreg << 1;
      left  <= left - 1'b1;
    end
  end

endmodule
