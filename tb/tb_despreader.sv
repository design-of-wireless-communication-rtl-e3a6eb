// Testbench for despreader. Chips are made here from random symbol bits,
// the PN reference (s[n+5] = s[n+3] ^ s[n], seed 1,0,0,0,0) and random
// noise, and sent with random gaps. For each group of 16 valid chips the
// expected soft values are the sums of chip * (+1 or -1 by PN chip); the
// output must match them exactly and arrive one cycle after the last chip.
module tb_despreader;
  import sdr_pkg::*;
  localparam int ACC_W = SAMPLE_W + $clog2(SF) + 1;
  logic clk = 0, rst_n = 0;
  logic signed [SAMPLE_W-1:0] chip_i, chip_q;
  logic chip_valid, sym_valid;
  logic signed [ACC_W-1:0] soft_i, soft_q;
  int checks = 0, failures = 0;
  int exp_i[$], exp_q[$];
  bit pn[];
  int nchip = 0, acc_i = 0, acc_q = 0, last_chip_cycle = 0, cycles = 0;

  despreader dut (.*);

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
    if (rst_n && chip_valid) begin
      int sgn;
      sgn = pn[nchip % 31] ? -1 : 1;
      acc_i += sgn * int'(chip_i);
      acc_q += sgn * int'(chip_q);
      nchip++;
      if (nchip % SF == 0) begin
        exp_i.push_back(acc_i);
        exp_q.push_back(acc_q);
        acc_i = 0;
        acc_q = 0;
        last_chip_cycle = cycles;
      end
    end
    if (rst_n && sym_valid) begin
      checks++;
      if (exp_i.size() == 0 || int'(soft_i) != exp_i[0] || int'(soft_q) != exp_q[0]
          || cycles != last_chip_cycle + 1) begin
        failures++;
        $display("symbol mismatch: got %0d,%0d", soft_i, soft_q);
      end
      if (exp_i.size() != 0) begin
        void'(exp_i.pop_front());
        void'(exp_q.pop_front());
      end
    end
  end

  initial begin
    bit bi, bq;
    int sent;
    pn = new[31];
    pn[0] = 1;
    for (int n = 1; n < 5; n++) pn[n] = 0;
    for (int n = 0; n + 5 < 31; n++) pn[n+5] = pn[n+3] ^ pn[n];
    chip_valid = 0; chip_i = 0; chip_q = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    sent = 0;
    for (int s = 0; s < 300; s++) begin
      bi = 1'($urandom);
      bq = 1'($urandom);
      for (int c = 0; c < SF; c++) begin
        @(negedge clk);
        if ($urandom % 4 == 0) begin
          chip_valid = 0;
          @(negedge clk);
        end
        chip_i = SAMPLE_W'(((bi ^ pn[sent % 31]) ? -32 : 32) + int'($urandom % 61) - 30);
        chip_q = SAMPLE_W'(((bq ^ pn[sent % 31]) ? -32 : 32) + int'($urandom % 61) - 30);
        chip_valid = 1;
        sent++;
      end
    end
    @(negedge clk);
    chip_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (exp_i.size() != 0 || nchip != 300 * SF) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
