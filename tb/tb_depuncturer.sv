// Testbench for depuncturer. Random code pairs of 3-bit soft values are
// punctured here (rate 2/3:
// X sent for even pairs only, Y always; rate 1/2: both) and the bits sent
// with random gaps. Every rebuilt pair must carry the sent bits in place
// and an erasure flag exactly where a bit was deleted, in the order the
// pairs were made. The rate is switched between blocks of pairs.
module tb_depuncturer;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0;
  rate_e rate;
  logic [SOFT_W-1:0] in_soft;
  logic in_valid, pair_valid;
  code_pair_t pair;
  int checks = 0, failures = 0;
  code_pair_t exp_q[$];
  int npairs = 0;

  depuncturer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && pair_valid) begin
      code_pair_t e;
      checks++;
      npairs++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected pair");
      end else begin
        e = exp_q.pop_front();
        if (pair.x_erased != e.x_erased || pair.y_erased != e.y_erased
            || (!e.x_erased && pair.x != e.x) || (!e.y_erased && pair.y != e.y)) begin
          failures++;
          $display("pair %0d mismatch: got %b expected %b", npairs, pair, e);
        end
      end
    end
  end

  task automatic send_bit(input logic [SOFT_W-1:0] b);
    @(negedge clk);
    while ($urandom % 3 == 0) begin
      in_valid = 0;
      @(negedge clk);
    end
    in_soft = b;
    in_valid = 1;
  endtask

  task automatic run(input rate_e r, input int n);
    rate = r;
    for (int k = 0; k < n; k++) begin
      code_pair_t p;
      p.x = SOFT_W'($urandom);
      p.y = SOFT_W'($urandom);
      p.x_erased = (r == RATE_2_3) && (k % 2 == 1);
      p.y_erased = 0;
      exp_q.push_back(p);
      if (!p.x_erased) send_bit(p.x);
      send_bit(p.y);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d pairs missing", exp_q.size());
    end
  endtask

  initial begin
    in_valid = 0; in_soft = 0; rate = RATE_2_3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(RATE_2_3, 600);
    run(RATE_1_2, 300);
    run(RATE_2_3, 400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
