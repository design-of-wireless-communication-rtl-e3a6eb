// Testbench for qpsk_mapper: a random bit stream with source gaps and sink
// stalls must come out as symbols whose I bit is the first of each pair and
// whose Q bit is the second.
module tb_qpsk_mapper;
  import sdr_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_bit, in_valid, in_ready, sym_valid, sym_ready;
  qpsk_sym_t sym;
  int checks = 0, failures = 0;
  bit ref_bits[$];
  int to_send = 0;
  bit took = 0;

  qpsk_mapper dut (.*);

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
      ref_bits.push_back(in_bit);
      took = 1;
    end
    if (rst_n && sym_valid && sym_ready) begin
      checks++;
      if (ref_bits.size() < 2 || sym.i != ref_bits[0] || sym.q != ref_bits[1]) begin
        failures++;
        $display("symbol mismatch: got i=%b q=%b", sym.i, sym.q);
      end
      if (ref_bits.size() >= 2) begin
        void'(ref_bits.pop_front());
        void'(ref_bits.pop_front());
      end
    end
  end

  always @(negedge clk) begin
    sym_ready <= ($urandom % 3 != 0);
    if (!in_valid || took) begin
      if (to_send > 0 && $urandom % 4 != 0) begin
        in_bit   <= 1'($urandom);
        in_valid <= 1'b1;
        to_send  <= to_send - 1;
      end else begin
        in_valid <= 1'b0;
      end
    end
  end

  initial begin
    in_valid = 0; in_bit = 0; sym_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    to_send = 2000;
    wait (to_send == 0 && !in_valid && ref_bits.size() == 0);
    repeat (3) @(posedge clk);
    checks++;
    if (ref_bits.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
