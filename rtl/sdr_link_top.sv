// Spread-spectrum QPSK baseband link: transmitter and receiver.
//
// Transmitter: source words are serialized, encoded by the rate 1/2, K=7
// (171,133) convolutional encoder, punctured to rate 2/3 (codes 10 and 11),
// mapped two bits at a time onto QPSK and spread by a PN sequence with gain
// 16. The chip samples leave on tx_chip_*; the channel (an AWGN channel in
// the link's evaluation, or converters and RF) is outside this module.
// Receiver: chip samples entering on rx_chip_* are despread with the same
// PN sequence, demodulated into 3-bit soft values, depunctured (nulls
// inserted at the deleted positions), Viterbi decoded with a trace back of
// 48 and regrouped into words on rx_word. METRIC selects whether the
// decoder uses only the sign of each soft value (Hamming, the default) or
// all of it (Euclidean). The demapper's hard bit and the spreader's PN chip
// outputs are not needed here and are left unconnected.
// The despread soft symbols are also brought out (rx_soft_*) so the
// constellation can be observed. tx_rate and rx_rate select rate 2/3 or
// unpunctured rate 1/2; they are separate because the two ends of a link
// switch at different times. Change either only at a group boundary with
// the link drained (see the README).
// Interface: src_word is valid/ready; the transmitter stalls the source
// while the spreader is busy (one QPSK symbol per 16 chips). The chip and
// word outputs have no back-pressure. All registers reset together, which
// aligns the PN generators and puncture phases of both ends.
// The chain of blocks and their parameters follow the link description;
// word width, sample format and handshakes are this design's choices.
module sdr_link_top
  import sdr_pkg::*;
#(
  parameter metric_e     METRIC = METRIC_HAMMING,
  parameter int unsigned W     = 2,
  parameter int unsigned ACC_W = SAMPLE_W + $clog2(SF) + 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  rate_e                      tx_rate,
  input  rate_e                      rx_rate,
  // data source
  input  logic [W-1:0]               src_word,
  input  logic                       src_valid,
  output logic                       src_ready,
  // transmitted chips
  output logic signed [SAMPLE_W-1:0] tx_chip_i,
  output logic signed [SAMPLE_W-1:0] tx_chip_q,
  output logic                       tx_chip_valid,
  // received chips
  input  logic signed [SAMPLE_W-1:0] rx_chip_i,
  input  logic signed [SAMPLE_W-1:0] rx_chip_q,
  input  logic                       rx_chip_valid,
  // despread symbols (constellation monitor)
  output logic signed [ACC_W-1:0]    rx_soft_i,
  output logic signed [ACC_W-1:0]    rx_soft_q,
  output logic                       rx_soft_valid,
  // decoded data
  output logic [W-1:0]               rx_word,
  output logic                       rx_word_valid
);

  // ---------------- transmitter ----------------
  logic      ser_bit, ser_valid, ser_ready;
  logic      enc_x, enc_y, enc_valid, enc_ready;
  logic      pun_bit, pun_valid, pun_ready;
  qpsk_sym_t map_sym;
  logic      map_valid, map_ready;

  bit_serializer #(.W(W)) u_ser (
    .clk, .rst_n,
    .in_word  (src_word), .in_valid (src_valid), .in_ready (src_ready),
    .out_bit  (ser_bit),  .out_valid(ser_valid), .out_ready(ser_ready)
  );

  conv_encoder u_enc (
    .clk, .rst_n,
    .din (ser_bit), .vin (ser_valid), .in_ready (ser_ready),
    .x   (enc_x),   .y   (enc_y),     .vout (enc_valid), .out_ready(enc_ready)
  );

  puncturer u_pun (
    .clk, .rst_n, .rate(tx_rate),
    .x (enc_x), .y (enc_y), .in_valid (enc_valid), .in_ready (enc_ready),
    .out_bit (pun_bit), .out_valid (pun_valid), .out_ready (pun_ready)
  );

  qpsk_mapper u_map (
    .clk, .rst_n,
    .in_bit (pun_bit), .in_valid (pun_valid), .in_ready (pun_ready),
    .sym (map_sym), .sym_valid (map_valid), .sym_ready (map_ready)
  );

  spreader u_spr (
    .clk, .rst_n,
    .sym (map_sym), .sym_valid (map_valid), .sym_ready (map_ready),
    .chip_i (tx_chip_i), .chip_q (tx_chip_q), .chip_valid (tx_chip_valid),
    .pn_chip ()
  );

  // ---------------- receiver ----------------
  logic              dem_valid;
  logic [SOFT_W-1:0] dem_soft;
  code_pair_t dep_pair;
  logic       dep_valid;
  logic       dec_bit, dec_valid;

  despreader #(.ACC_W(ACC_W)) u_desp (
    .clk, .rst_n,
    .chip_i (rx_chip_i), .chip_q (rx_chip_q), .chip_valid (rx_chip_valid),
    .soft_i (rx_soft_i), .soft_q (rx_soft_q), .sym_valid (rx_soft_valid)
  );

  qpsk_demapper #(.ACC_W(ACC_W)) u_dem (
    .clk, .rst_n,
    .soft_i (rx_soft_i), .soft_q (rx_soft_q), .sym_valid (rx_soft_valid),
    .out_bit (), .out_soft (dem_soft), .bit_valid (dem_valid)
  );

  depuncturer u_dep (
    .clk, .rst_n, .rate(rx_rate),
    .in_soft (dem_soft), .in_valid (dem_valid),
    .pair (dep_pair), .pair_valid (dep_valid)
  );

  viterbi_decoder #(.METRIC(METRIC)) u_vit (
    .clk, .rst_n,
    .pair (dep_pair), .in_valid (dep_valid),
    .out_bit (dec_bit), .out_valid (dec_valid)
  );

  bit_deserializer #(.W(W)) u_des (
    .clk, .rst_n,
    .in_bit (dec_bit), .in_valid (dec_valid),
    .word (rx_word), .word_valid (rx_word_valid)
  );

endmodule
