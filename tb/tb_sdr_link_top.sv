// End-to-end testbench of sdr_link_top at its default parameters.
//
// A random word source feeds the transmitter; its chips pass through the
// behavioural AWGN channel back into the receiver, and every received word
// is compared, in order, with the word sent. Phases:
//   1. rate 2/3, clean channel: all words correct; the chip stream must be
//      gap-free (16 chips per symbol, 24 cycles per 2-bit word) while the
//      source is stalled by the spreader;
//   2. drain, switch both ends to rate 1/2, light noise: all words correct;
//   3. drain, back to rate 2/3, noise giving raw symbol-bit errors that the
//      decoder must correct (raw errors > 0, decoded errors = 0);
//   4. a noise sweep at rate 2/3 that reports raw and decoded bit error
//      rates per noise level, checking that the cleanest level decodes
//      without error and that raw errors grow with the noise.
// Raw errors are hard decisions on the despread symbols (rx_soft_*)
// against symbols from a reference model of the transmitter kept here. Each mechanism (source stall,
// rate switch, erased bits fed to the decoder, corrected errors) is
// counted, and one that never happened counts as a failure.
module tb_sdr_link_top;
  import sdr_pkg::*;
  localparam int W = 2;
  localparam int ACC_W = SAMPLE_W + $clog2(SF) + 1;

  logic clk = 0, rst_n = 0;
  rate_e tx_rate, rx_rate;
  logic [W-1:0] src_word;
  logic src_valid, src_ready;
  logic signed [SAMPLE_W-1:0] tx_chip_i, tx_chip_q, rx_chip_i, rx_chip_q;
  logic tx_chip_valid, rx_chip_valid;
  logic signed [ACC_W-1:0] rx_soft_i, rx_soft_q;
  logic rx_soft_valid;
  logic [W-1:0] rx_word;
  logic rx_word_valid;
  real sigma = 0.0;

  int checks = 0, failures = 0;
  int cycles = 0;

  sdr_link_top u_dut (.*);

  awgn_channel #(.SAMPLE_W(SAMPLE_W)) u_ch (
    .clk, .sigma,
    .in_i (tx_chip_i), .in_q (tx_chip_q), .in_valid (tx_chip_valid),
    .out_i(rx_chip_i), .out_q(rx_chip_q), .out_valid(rx_chip_valid)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- monitors ----------------
  logic [W-1:0] sent_q[$];
  qpsk_sym_t    sym_q[$];
  int to_send = 0, words_in = 0, words_out = 0;
  int word_err = 0, bit_err = 0, raw_err = 0, raw_bits = 0;
  int n_stall = 0, n_switch = 0, n_erased = 0, n_chips = 0, n_chip_gaps = 0;
  bit took = 0, count_gaps = 0;

  // Reference transmitter: serializer (MSB first), encoder with the
  // explicit taps of 171/133, puncturing by the codes 10/11 at rate 2/3,
  // and QPSK pairing (first bit I, second bit Q).
  bit [6:0] hist = '0;
  int pair_no = 0;
  bit coded_q[$];

  function automatic void tx_model(input logic [W-1:0] word);
    for (int b = W - 1; b >= 0; b--) begin
      bit [6:0] h;
      h = {hist[5:0], word[b]};
      hist = h;
      if (tx_rate == RATE_1_2 || pair_no % 2 == 0)
        coded_q.push_back(h[0] ^ h[1] ^ h[2] ^ h[3] ^ h[6]);
      else
        n_erased++;
      coded_q.push_back(h[0] ^ h[2] ^ h[3] ^ h[5] ^ h[6]);
      pair_no++;
      while (coded_q.size() >= 2) begin
        qpsk_sym_t s;
        s.i = coded_q.pop_front();
        s.q = coded_q.pop_front();
        sym_q.push_back(s);
      end
    end
  endfunction

  always @(posedge clk) begin
    cycles++;
    took = 0;
    if (rst_n && src_valid && src_ready) begin
      sent_q.push_back(src_word);
      words_in++;
      took = 1;
      tx_model(src_word);
    end
    if (rst_n && src_valid && !src_ready) n_stall++;
    if (rst_n && tx_chip_valid) n_chips++;
    if (rst_n && count_gaps && !tx_chip_valid) n_chip_gaps++;
    if (rst_n && rx_soft_valid) begin
      qpsk_sym_t s;
      s = (sym_q.size() != 0) ? sym_q.pop_front() : '0;
      raw_bits += 2;
      raw_err += int'((rx_soft_i < 0) != s.i) + int'((rx_soft_q < 0) != s.q);
    end
    if (rst_n && rx_word_valid) begin
      logic [W-1:0] e;
      e = (sent_q.size() != 0) ? sent_q.pop_front() : ~rx_word;
      words_out++;
      if (e != rx_word) begin
        word_err++;
        bit_err += $countones(e ^ rx_word);
      end
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

  // ---------------- sequencing ----------------
  task automatic send_words(input int n);
    to_send = n;
    wait (to_send == 0);
    @(posedge clk);
    while (src_valid) @(posedge clk);
  endtask

  // Wait until no chips have been sent for a while and the receiver has
  // finished with the last of them.
  task automatic drain();
    int quiet = 0;
    while (quiet < 64) begin
      @(posedge clk);
      quiet = tx_chip_valid ? 0 : quiet + 1;
    end
  endtask

  task automatic set_rate(input rate_e r);
    drain();
    @(negedge clk);
    tx_rate = r;
    rx_rate = r;
    n_switch++;
  endtask

  // Reset the error counters at a phase start; the words still inside the
  // decoder belong to the previous phase, so errors are charged per phase
  // only approximately; phases are long against the 48-step delay.
  task automatic phase_start();
    word_err = 0; bit_err = 0; raw_err = 0; raw_bits = 0;
  endtask

  initial begin
    int c0, t0, s0;
    real snr_db;
    int raw_lo, raw_hi, dec_lo;
    src_valid = 0; src_word = 0;
    tx_rate = RATE_2_3; rx_rate = RATE_2_3;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Phase 1: clean channel, rate 2/3, continuous source.
    phase_start();
    sigma = 0.0;
    c0 = n_chips;
    s0 = n_stall;
    to_send = 400;
    wait (tx_chip_valid);
    t0 = cycles;
    count_gaps = 1;
    wait (to_send == 0);
    count_gaps = 0;
    checks++;
    if (n_chip_gaps != 0) begin
      failures++;
      $display("chip stream had %0d gaps with a waiting source", n_chip_gaps);
    end
    while (src_valid) @(posedge clk);
    drain();
    checks++;
    // 400 words of 2 bits at rate 2/3: 1200 coded bits, 600 symbols
    if (n_chips - c0 != 600 * SF) begin
      failures++;
      $display("phase 1: %0d chips, expected %0d", n_chips - c0, 600 * SF);
    end
    checks++;
    if (word_err != 0) begin
      failures++;
      $display("phase 1: %0d word errors on a clean channel", word_err);
    end
    $display("phase 1: %0d words in, %0d out, %0d stall cycles, %0d chips in %0d cycles",
             words_in, words_out, n_stall - s0, n_chips - c0, cycles - t0);

    // Phase 2: rate 1/2, light noise.
    set_rate(RATE_1_2);
    phase_start();
    sigma = 16.0;
    send_words(300);
    drain();
    checks++;
    if (word_err != 0) begin
      failures++;
      $display("phase 2: %0d word errors", word_err);
    end
    $display("phase 2: rate 1/2, raw errors %0d of %0d, decoded word errors %0d",
             raw_err, raw_bits, word_err);

    // Phase 3: rate 2/3, noise with raw errors the decoder corrects.
    set_rate(RATE_2_3);
    phase_start();
    sigma = 48.0;
    send_words(600);
    drain();
    checks++;
    if (raw_err == 0 || word_err != 0) begin
      failures++;
      $display("phase 3: raw errors %0d, decoded word errors %0d", raw_err, word_err);
    end
    $display("phase 3: rate 2/3, raw errors %0d of %0d corrected, decoded word errors %0d",
             raw_err, raw_bits, word_err);

    // Phase 4: noise sweep at rate 2/3.
    raw_lo = 0; raw_hi = 0; dec_lo = 0;
    for (int k = 0; k < 5; k++) begin
      sigma = 16.0 * real'(k + 1);
      snr_db = 20.0 * $log10(real'(CHIP_AMP) / sigma);
      phase_start();
      send_words(400);
      drain();
      $display("sweep: chip SNR %5.1f dB (sigma %0.0f): raw BER %0d/%0d, decoded BER %0d/%0d",
               snr_db, sigma, raw_err, raw_bits, bit_err, 400 * W);
      if (k == 0) begin
        raw_lo = raw_err;
        dec_lo = bit_err;
      end
      if (k == 4) raw_hi = raw_err;
    end
    checks++;
    if (dec_lo != 0 || raw_hi <= raw_lo) begin
      failures++;
      $display("sweep: decoded errors at the cleanest level %0d, raw %0d -> %0d",
               dec_lo, raw_lo, raw_hi);
    end

    // Flush the decoder with clean data so every sent word comes back.
    sigma = 0.0;
    send_words(80);
    drain();
    repeat (20) @(posedge clk);
    checks++;
    if (words_out + 40 < words_in) begin
      failures++;
      $display("%0d words sent, %0d received", words_in, words_out);
    end

    // Mechanisms.
    checks++;
    if (n_stall == 0)  begin failures++; $display("no source stall seen"); end
    checks++;
    if (n_switch < 2)  begin failures++; $display("no rate switch"); end
    checks++;
    if (n_erased == 0) begin failures++; $display("no punctured bit sent"); end
    $display("mechanisms: stalls %0d, rate switches %0d, punctured bits %0d",
             n_stall, n_switch, n_erased);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
