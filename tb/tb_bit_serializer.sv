// Testbench for bit_serializer: random words with random source gaps and
// random sink stalls; the serial stream must repeat every word MSB first.
// A gap-free phase with both sides always ready checks one bit per cycle.
// Inputs change on the falling edge; handshakes are sampled on the rising.
module tb_bit_serializer;
  localparam int W = 2;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] in_word;
  logic in_valid, in_ready, out_bit, out_valid, out_ready;
  int checks = 0, failures = 0;
  bit exp_q[$];
  int cycles = 0, to_send = 0, bits_out = 0;
  bit gaps = 1, stalls = 1, took = 0;

  bit_serializer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitors (pre-edge values)
  always @(posedge clk) begin
    cycles++;
    took = 0;
    if (rst_n && in_valid && in_ready) begin
      for (int b = W - 1; b >= 0; b--) exp_q.push_back(in_word[b]);
      took = 1;
    end
    if (rst_n && out_valid && out_ready) begin
      checks++;
      bits_out++;
      if (exp_q.size() == 0 || exp_q[0] != out_bit) begin
        failures++;
        $display("bit mismatch at cycle %0d", cycles);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  // source and sink drivers
  always @(negedge clk) begin
    out_ready <= stalls ? ($urandom % 4 != 0) : 1'b1;
    if (!in_valid || took) begin
      if (to_send > 0 && !(gaps && $urandom % 3 == 0)) begin
        in_word  <= W'($urandom);
        in_valid <= 1'b1;
        to_send  <= to_send - 1;
      end else begin
        in_valid <= 1'b0;
      end
    end
  end

  initial begin
    int t0, b0;
    in_valid = 0; in_word = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    to_send = 300;
    wait (to_send == 0 && !in_valid && exp_q.size() == 0);
    repeat (5) @(posedge clk);
    // throughput: 64 words with no gaps or stalls -> one bit per cycle
    gaps = 0; stalls = 0;
    @(posedge clk);
    t0 = cycles; b0 = bits_out;
    to_send = 64;
    wait (to_send == 0 && !in_valid && exp_q.size() == 0);
    checks++;
    if (bits_out - b0 != 64 * W) begin
      failures++;
      $display("expected %0d bits, got %0d", 64 * W, bits_out - b0);
    end
    checks++;
    if (cycles - t0 > 64 * W + 4) begin
      failures++;
      $display("throughput: %0d cycles for %0d bits", cycles - t0, 64 * W);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
