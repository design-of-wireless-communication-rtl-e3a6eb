// Testbench for pn_generator. With x^5 + x^3 + 1 the chip sequence s must
// obey s[n+5] = s[n+3] ^ s[n], repeat with period 31 and no shorter period,
// and hold 16 ones per period (a maximal-length sequence). The first five
// chips after reset are the seed 00001 read from bit 0 up. Holding en low
// must freeze the sequence.
module tb_pn_generator;
  logic clk = 0, rst_n = 0, en = 0, chip;
  int checks = 0, failures = 0;
  bit s[$];

  pn_generator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ones;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      // hold en low now and then; the chip must not move
      if (n % 7 == 3) begin
        bit held;
        held = chip;
        en = 0;
        @(negedge clk);
        checks++;
        if (chip != held) failures++;
      end
      s.push_back(chip);
      en = 1;
    end
    en = 0;
    // seed
    for (int n = 0; n < 5; n++) begin
      checks++;
      if (s[n] != (n == 0)) failures++;
    end
    // recurrence
    for (int n = 0; n + 5 < s.size(); n++) begin
      checks++;
      if (s[n+5] != (s[n+3] ^ s[n])) failures++;
    end
    // period 31, none shorter
    for (int p = 1; p <= 31; p++) begin
      bit same;
      same = 1;
      for (int n = 0; n + p < s.size(); n++) if (s[n] != s[n+p]) same = 0;
      checks++;
      if (same != (p == 31)) begin
        failures++;
        $display("period test failed at %0d", p);
      end
    end
    ones = 0;
    for (int n = 0; n < 31; n++) ones += s[n];
    checks++;
    if (ones != 16) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
