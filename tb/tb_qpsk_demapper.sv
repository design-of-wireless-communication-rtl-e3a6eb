// Testbench for qpsk_demapper. Random soft symbols (including zero and the
// extreme values) arrive every 2 to 20 cycles; each must give two outputs,
// first for I and then for Q, in the two cycles after the symbol. The hard
// bit must be 1 exactly for a negative value, and the 3-bit soft value must
// equal 3 - floor(v / 128) clipped to 0..7, worked out here with integer
// arithmetic.
module tb_qpsk_demapper;
  import sdr_pkg::*;
  localparam int ACC_W = 13;
  logic clk = 0, rst_n = 0;
  logic signed [ACC_W-1:0] soft_i, soft_q;
  logic sym_valid, out_bit, bit_valid;
  logic [SOFT_W-1:0] out_soft;
  int exp_s[$];
  int checks = 0, failures = 0;
  bit exp_q[$];
  int nbits = 0;
  int gap;

  qpsk_demapper dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && bit_valid) begin
      checks++;
      nbits++;
      if (exp_q.size() == 0 || exp_q[0] != out_bit || exp_s[0] != int'(out_soft)) begin
        failures++;
        $display("bit mismatch at bit %0d", nbits);
      end
      if (exp_q.size() != 0) begin
        void'(exp_q.pop_front());
        void'(exp_s.pop_front());
      end
    end
  end

  function automatic logic signed [ACC_W-1:0] pick();
    case ($urandom % 6)
      0: return '0;
      1: return {1'b1, {(ACC_W-1){1'b0}}};
      2: return {1'b0, {(ACC_W-1){1'b1}}};
      3: return -1;
      default: return ACC_W'($urandom);
    endcase
  endfunction

  // floor division by 128, then clip
  function automatic int qref(input int v);
    int f, q;
    f = (v >= 0) ? v / 128 : -((-v + 127) / 128);
    q = 3 - f;
    if (q < 0) q = 0;
    if (q > 7) q = 7;
    return q;
  endfunction

  initial begin
    sym_valid = 0; soft_i = 0; soft_q = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 1000; s++) begin
      @(negedge clk);
      soft_i = pick();
      soft_q = pick();
      sym_valid = 1;
      exp_q.push_back(soft_i < 0);
      exp_q.push_back(soft_q < 0);
      exp_s.push_back(qref(int'(soft_i)));
      exp_s.push_back(qref(int'(soft_q)));
      @(negedge clk);
      sym_valid = 0;
      gap = $urandom % 19;
      repeat (gap) @(negedge clk);
      // both bits must be out within two cycles of the symbol
      if (gap >= 2) checks++;
      if (gap >= 2 && exp_q.size() != 0) begin
        failures++;
        $display("bits late after symbol %0d", s);
      end
    end
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
