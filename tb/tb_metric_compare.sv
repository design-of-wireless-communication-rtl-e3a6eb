// Noise-sweep comparison of the decoder's two branch metrics.
//
// Two copies of sdr_link_top receive the same noisy chips: the first, with
// the Hamming metric, also transmits; the second uses the Euclidean metric
// on the 3-bit soft values. Both run rate 2/3. For each noise level the
// decoded bit errors of both are counted against the sent words. Checks:
// both are error-free at the cleanest level, the Euclidean copy makes no
// more errors than the Hamming copy over the whole sweep, and the two
// deliver the same number of words.
module tb_metric_compare;
  import sdr_pkg::*;
  localparam int W = 2;
  localparam int ACC_W = SAMPLE_W + $clog2(SF) + 1;
  localparam int NLEV = 6;
  localparam int NWORDS = 500;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] src_word;
  logic src_valid, src_ready, src_ready_b;
  logic signed [SAMPLE_W-1:0] tx_i, tx_q, rx_i, rx_q, tx_i_b, tx_q_b;
  logic tx_v, rx_v, tx_v_b;
  logic signed [ACC_W-1:0] sa_i, sa_q, sb_i, sb_q;
  logic sa_v, sb_v;
  logic [W-1:0] wa, wb;
  logic wa_v, wb_v;
  real sigma = 0.0;
  int checks = 0, failures = 0;

  sdr_link_top u_hard (
    .clk, .rst_n, .tx_rate (RATE_2_3), .rx_rate (RATE_2_3),
    .src_word, .src_valid, .src_ready,
    .tx_chip_i (tx_i), .tx_chip_q (tx_q), .tx_chip_valid (tx_v),
    .rx_chip_i (rx_i), .rx_chip_q (rx_q), .rx_chip_valid (rx_v),
    .rx_soft_i (sa_i), .rx_soft_q (sa_q), .rx_soft_valid (sa_v),
    .rx_word (wa), .rx_word_valid (wa_v)
  );

  sdr_link_top #(.METRIC(METRIC_EUCLIDEAN)) u_soft (
    .clk, .rst_n, .tx_rate (RATE_2_3), .rx_rate (RATE_2_3),
    .src_word ('0), .src_valid (1'b0), .src_ready (src_ready_b),
    .tx_chip_i (tx_i_b), .tx_chip_q (tx_q_b), .tx_chip_valid (tx_v_b),
    .rx_chip_i (rx_i), .rx_chip_q (rx_q), .rx_chip_valid (rx_v),
    .rx_soft_i (sb_i), .rx_soft_q (sb_q), .rx_soft_valid (sb_v),
    .rx_word (wb), .rx_word_valid (wb_v)
  );

  awgn_channel #(.SAMPLE_W(SAMPLE_W)) u_ch (
    .clk, .sigma,
    .in_i (tx_i), .in_q (tx_q), .in_valid (tx_v),
    .out_i (rx_i), .out_q (rx_q), .out_valid (rx_v)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] sent[$];
  int na = 0, nb = 0, ea = 0, eb = 0, to_send = 0;
  bit took = 0;

  always @(posedge clk) begin
    took = 0;
    if (rst_n && src_valid && src_ready) begin
      sent.push_back(src_word);
      took = 1;
    end
    if (rst_n && wa_v) begin
      ea += $countones(wa ^ sent[na]);
      na++;
    end
    if (rst_n && wb_v) begin
      eb += $countones(wb ^ sent[nb]);
      nb++;
    end
  end

  always @(negedge clk) begin
    if (!src_valid || took) begin
      if (to_send > 0) begin
        src_word  <= W'($urandom);
        src_valid <= 1'b1;
        to_send   <= to_send - 1;
      end else begin
        src_valid <= 1'b0;
      end
    end
  end

  initial begin
    int ea0, eb0, ta, tb;
    int quiet;
    src_valid = 0; src_word = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    ta = 0; tb = 0;
    for (int k = 0; k < NLEV; k++) begin
      sigma = 16.0 * real'(k + 1);
      ea0 = ea; eb0 = eb;
      to_send = NWORDS;
      wait (to_send == 0);
      @(posedge clk);
      while (src_valid) @(posedge clk);
      quiet = 0;
      while (quiet < 64) begin
        @(posedge clk);
        quiet = tx_v ? 0 : quiet + 1;
      end
      $display("chip SNR %5.1f dB: decoded bit errors Hamming %0d, Euclidean %0d (of about %0d)",
               20.0 * $log10(real'(CHIP_AMP) / sigma), ea - ea0, eb - eb0, NWORDS * W);
      if (k == 0) begin
        checks++;
        if (ea != 0 || eb != 0) begin
          failures++;
          $display("errors at the cleanest level");
        end
      end
      ta += ea - ea0;
      tb += eb - eb0;
    end
    checks++;
    if (tb > ta) begin
      failures++;
      $display("Euclidean metric made more errors (%0d) than Hamming (%0d)", tb, ta);
    end
    checks++;
    if (na != nb || na == 0) begin
      failures++;
      $display("word counts differ: %0d and %0d", na, nb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
