// Testbench for viterbi_decoder, both metrics. A random bit stream is encoded here with
// the explicit taps of 171 and 133 octal. Three phases run back to back on
// one stream: clean rate 1/2 pairs; rate 1/2 with one flipped code bit at a
// random place in every 16 steps; rate 2/3 (X erased on odd steps) with one
// flipped bit in every 24 steps. Such sparse errors are within what the
// code corrects, so every decoded bit must equal the source bit, in order.
// The bit of step n must not leave before step n+48 has been accepted (the
// decision depth) and must leave before step n+2*(48+8)+2 (the trace-back
// schedule). Steps are offered 2 to 15 clocks apart, about the trace-back
// unit's pace, so the decision memory absorbs the bursts.
module tb_viterbi_decoder;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0;
  code_pair_t pair, pair_e;
  logic in_valid, out_bit, out_valid, out_bit_e, out_valid_e;
  int nout_e = 0;
  int checks = 0, failures = 0;
  bit src[$];
  int cycles = 0, nsteps = 0, nout = 0, flips = 0;

  viterbi_decoder dut (.*);

  // Second decoder with the Euclidean metric, fed the same steps as soft
  // values: correct bits strong (0..2 or 5..7), flipped bits weak (3 or 4
  // on the wrong side), and twice as many flips.
  viterbi_decoder #(.METRIC(METRIC_EUCLIDEAN)) dut_e (
    .clk, .rst_n, .pair (pair_e), .in_valid,
    .out_bit (out_bit_e), .out_valid (out_valid_e)
  );

  function automatic logic [SOFT_W-1:0] sure_val(input bit b);
    return b ? SOFT_W'(5 + $urandom % 3) : SOFT_W'($urandom % 3);
  endfunction

  function automatic logic [SOFT_W-1:0] weak_wrong_val(input bit b);
    return b ? SOFT_W'(3) : SOFT_W'(4);
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid_e) begin
      checks++;
      if (nout_e >= src.size() || src[nout_e] != out_bit_e) begin
        failures++;
        $display("Euclidean output %0d wrong", nout_e);
      end
      nout_e++;
    end
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    if (rst_n && out_valid) begin
      checks++;
      if (nout >= src.size() || src[nout] != out_bit) begin
        failures++;
        $display("output %0d wrong (cycle %0d)", nout, cycles);
      end
      checks++;
      if (nsteps < nout + TB_LEN + 1 || nsteps > nout + 2 * (TB_LEN + 8) + 2) begin
        failures++;
        $display("output %0d left after %0d steps", nout, nsteps);
      end
      nout++;
    end
    if (rst_n && in_valid) nsteps++;
  end

  bit [6:0] hist = '0;

  task automatic run(input int n, input int err_every, input bit punct);
    int err_at;
    for (int k = 0; k < n; k++) begin
      bit u;
      bit [6:0] h;
      bit ex, ey, tx, ty, ex2, ey2;
      u = 1'($urandom);
      src.push_back(u);
      h = {hist[5:0], u};
      hist = h;
      ex = h[0] ^ h[1] ^ h[2] ^ h[3] ^ h[6];
      ey = h[0] ^ h[2] ^ h[3] ^ h[5] ^ h[6];
      tx = ex;
      ty = ey;
      if (err_every > 0 && k % err_every == 0) err_at = k + int'($urandom % err_every);
      if (err_every > 0 && k == err_at) begin
        if (punct && (k % 2 == 1)) ey = !ey;   // X is erased here
        else if ($urandom % 2 == 0) ex = !ex;
        else ey = !ey;
        flips++;
      end
      @(negedge clk);
      in_valid = 0;
      repeat (1 + $urandom % 14) @(negedge clk);
      pair.x        = (punct && (k % 2 == 1)) ? SOFT_W'($urandom) : {SOFT_W{ex}};
      pair.y        = {SOFT_W{ey}};
      pair.x_erased = punct && (k % 2 == 1);
      pair.y_erased = 0;
      // soft copy: the same flips plus one more weak flip on every 8th step
      ex2 = ex;
      ey2 = ey;
      if (err_every > 0 && k % 8 == 4) ey2 = !ey2;
      pair_e.x        = (punct && (k % 2 == 1)) ? SOFT_W'($urandom)
                      : ((ex2 != tx) ? weak_wrong_val(tx) : sure_val(tx));
      pair_e.y        = (ey2 != ty) ? weak_wrong_val(ty) : sure_val(ty);
      pair_e.x_erased = pair.x_erased;
      pair_e.y_erased = 0;
      in_valid      = 1;
    end
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    int quiet;
    in_valid = 0; pair = '0; pair_e = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(400, 0, 0);
    run(1200, 16, 0);
    run(1200, 24, 1);
    // let pending trace backs finish: wait for 200 clocks without output
    quiet = 0;
    while (quiet < 200) begin
      @(posedge clk);
      quiet = out_valid ? 0 : quiet + 1;
    end
    checks++;
    if (nout < nsteps - (TB_LEN + 8 + 1) - 8 || nout % 8 != 0) begin
      failures++;
      $display("%0d outputs for %0d steps", nout, nsteps);
    end
    checks++;
    if (nout_e != nout) begin
      failures++;
      $display("Euclidean decoder gave %0d bits, Hamming %0d", nout_e, nout);
    end
    $display("flipped %0d code bits", flips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
