// Testbench for conv_encoder. The reference keeps its own history of input
// bits and forms X and Y from the explicit taps of 171 and 133 octal
// (X: u, d1, d2, d3, d6; Y: u, d2, d3, d5, d6, with dk the input k bits
// back). First the impulse response is checked (X 1111001, Y 1011011, one
// pair per clock, one-cycle latency), then a random stream with source gaps
// and sink stalls.
module tb_conv_encoder;
  logic clk = 0, rst_n = 0;
  logic din, vin, in_ready, x, y, vout, out_ready;
  int checks = 0, failures = 0;
  bit [1:0] exp_q[$];
  bit [6:0] hist = '0;            // hist[0] = current input, hist[k] = dk
  int to_send = 0, cycles = 0, last_in = -1;
  bit gaps = 1, stalls = 1, took = 0;
  bit manual = 1;

  conv_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    took = 0;
    if (rst_n && vin && in_ready) begin
      bit [6:0] h;
      h = {hist[5:0], din};
      hist = h;
      exp_q.push_back({h[0] ^ h[1] ^ h[2] ^ h[3] ^ h[6],
                       h[0] ^ h[2] ^ h[3] ^ h[5] ^ h[6]});
      took = 1;
      last_in = cycles;
    end
    if (rst_n && vout && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || exp_q[0] != {x, y}) begin
        failures++;
        $display("pair mismatch at cycle %0d: got %b%b", cycles, x, y);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  always @(negedge clk) begin
    out_ready <= stalls ? ($urandom % 4 != 0) : 1'b1;
    if (!manual && (!vin || took)) begin
      if (to_send > 0 && !(gaps && $urandom % 3 == 0)) begin
        din     <= 1'($urandom);
        vin     <= 1'b1;
        to_send <= to_send - 1;
      end else begin
        vin <= 1'b0;
      end
    end
  end

  initial begin
    bit [6:0] xs, ys;
    vin = 0; din = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // impulse response, no gaps or stalls
    gaps = 0; stalls = 0;
    @(negedge clk);
    din = 1; vin = 1; to_send = 0;
    for (int k = 0; k < 7; k++) begin
      @(posedge clk);
      #1;
      checks++;
      if (!vout) begin
        failures++;
        $display("no output one cycle after input %0d", k);
      end
      xs[6-k] = x;
      ys[6-k] = y;
      @(negedge clk);
      din = 0;
    end
    vin = 0;
    checks++;
    if (xs != 7'b1111001 || ys != 7'b1011011) begin
      failures++;
      $display("impulse response X=%b Y=%b", xs, ys);
    end
    repeat (3) @(posedge clk);
    exp_q.delete();
    // random stream
    manual = 0; gaps = 1; stalls = 1;
    to_send = 2000;
    wait (to_send == 0 && !vin && exp_q.size() == 0);
    repeat (3) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
