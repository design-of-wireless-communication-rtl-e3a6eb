// Testbench for bit_deserializer: random bits with random gaps must come
// back as words, first bit in the MSB, each one cycle after its last bit.
module tb_bit_deserializer;
  localparam int W = 2;
  logic clk = 0, rst_n = 0;
  logic in_bit, in_valid, word_valid;
  logic [W-1:0] word;
  int checks = 0, failures = 0;
  bit [W-1:0] exp_q[$];
  bit [W-1:0] acc;
  int nb = 0, cycles = 0, last_cycle = 0;

  bit_deserializer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    if (rst_n && word_valid) begin
      checks++;
      if (exp_q.size() == 0 || exp_q[0] != word || cycles != last_cycle + 1) begin
        failures++;
        $display("word mismatch: got %b", word);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
    if (rst_n && in_valid) begin
      acc = {acc[W-2:0], in_bit};
      nb++;
      if (nb % W == 0) begin
        exp_q.push_back(acc);
        last_cycle = cycles;
      end
    end
  end

  initial begin
    in_valid = 0; in_bit = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      while ($urandom % 3 == 0) begin
        in_valid = 0;
        @(negedge clk);
      end
      in_bit = 1'($urandom);
      in_valid = 1;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
