// Testbench for puncturer. Random (X,Y) pairs go in with source gaps and
// sink stalls; the reference applies the codes 10 (X) and 11 (Y) per group
// of two pairs, so the stream must read X0 Y0 Y1 X2 Y2 Y3 ... and carry 3
// bits per 2 pairs. After the link is idle at a group boundary the rate is
// switched to 1/2 and every bit must pass, then back to 2/3.
module tb_puncturer;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0;
  rate_e rate;
  logic x, y, in_valid, in_ready, out_bit, out_valid, out_ready;
  int checks = 0, failures = 0;
  bit exp_q[$];
  int to_send = 0, pairs_in = 0, bits_out = 0;
  bit took = 0;

  puncturer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    took = 0;
    if (rst_n && in_valid && in_ready) begin
      if (rate == RATE_1_2) begin
        exp_q.push_back(x);
        exp_q.push_back(y);
      end else begin
        if (pairs_in % 2 == 0) exp_q.push_back(x);   // code 10 for X
        exp_q.push_back(y);                           // code 11 for Y
      end
      pairs_in++;
      took = 1;
    end
    if (rst_n && out_valid && out_ready) begin
      checks++;
      bits_out++;
      if (exp_q.size() == 0 || exp_q[0] != out_bit) begin
        failures++;
        $display("bit mismatch after %0d bits", bits_out);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  always @(negedge clk) begin
    out_ready <= ($urandom % 4 != 0);
    if (!in_valid || took) begin
      if (to_send > 0 && $urandom % 3 != 0) begin
        x <= 1'($urandom);
        y <= 1'($urandom);
        in_valid <= 1'b1;
        to_send  <= to_send - 1;
      end else begin
        in_valid <= 1'b0;
      end
    end
  end

  task automatic run(input rate_e r, input int n);
    int b0;
    b0 = bits_out;
    pairs_in = 0;
    rate = r;
    to_send = n;
    wait (to_send == 0 && !in_valid && exp_q.size() == 0);
    repeat (3) @(posedge clk);
    checks++;
    if (bits_out - b0 != ((r == RATE_2_3) ? n * 3 / 2 : n * 2)) begin
      failures++;
      $display("rate %0d: %0d pairs gave %0d bits", r, n, bits_out - b0);
    end
  endtask

  initial begin
    in_valid = 0; x = 0; y = 0; out_ready = 0; rate = RATE_2_3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(RATE_2_3, 1000);
    run(RATE_1_2, 400);
    run(RATE_2_3, 600);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
