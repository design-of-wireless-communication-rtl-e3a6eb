// Testbench for spreader. Symbols are offered with random gaps; every chip
// must equal +32/-32 according to the symbol bit XOR the PN chip, where the
// PN reference is built here from s[n+5] = s[n+3] ^ s[n] and the seed
// 1,0,0,0,0 and indexed by the number of chips sent so far. Each symbol
// must last exactly 16 chips, and with symbols always offered the chips
// must follow each other without a gap (16 cycles per symbol).
module tb_spreader;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0;
  qpsk_sym_t sym;
  logic sym_valid, sym_ready, chip_valid, pn_chip;
  logic signed [SAMPLE_W-1:0] chip_i, chip_q;
  int checks = 0, failures = 0;
  qpsk_sym_t sq[$];
  bit pn[];
  int nchip = 0, to_send = 0, cycles = 0;
  bit gaps = 1, took = 0;

  spreader dut (.*);

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
    took = 0;
    if (rst_n && sym_valid && sym_ready) begin
      sq.push_back(sym);
      took = 1;
    end
    if (rst_n && chip_valid) begin
      int k;
      logic signed [SAMPLE_W-1:0] ei, eq;
      k = nchip / SF;
      ei = (sq[k].i ^ pn[nchip % 31]) ? -8'sd32 : 8'sd32;
      eq = (sq[k].q ^ pn[nchip % 31]) ? -8'sd32 : 8'sd32;
      checks++;
      if (k >= sq.size() || chip_i != ei || chip_q != eq) begin
        failures++;
        $display("chip %0d: got %0d,%0d expected %0d,%0d", nchip, chip_i, chip_q, ei, eq);
      end
      nchip++;
    end
  end

  always @(negedge clk) begin
    if (!sym_valid || took) begin
      if (to_send > 0 && !(gaps && $urandom % 2 == 0)) begin
        sym       <= qpsk_sym_t'($urandom);
        sym_valid <= 1'b1;
        to_send   <= to_send - 1;
      end else begin
        sym_valid <= 1'b0;
      end
    end
  end

  initial begin
    int c0, t0;
    pn = new[31];
    pn[0] = 1;
    for (int n = 1; n < 5; n++) pn[n] = 0;
    for (int n = 0; n + 5 < 31; n++) pn[n+5] = pn[n+3] ^ pn[n];
    sym_valid = 0; sym = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    to_send = 200;
    wait (to_send == 0 && !sym_valid);
    wait (!chip_valid);
    checks++;
    if (nchip != 200 * SF) begin
      failures++;
      $display("%0d chips for 200 symbols", nchip);
    end
    // gap-free phase
    gaps = 0;
    c0 = nchip;
    @(posedge clk);
    t0 = cycles;
    to_send = 100;
    wait (to_send == 0 && !sym_valid);
    wait (!chip_valid);
    checks++;
    if (nchip - c0 != 100 * SF || cycles - t0 > 100 * SF + 4) begin
      failures++;
      $display("gap-free: %0d chips in %0d cycles", nchip - c0, cycles - t0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
