// Shared constants and types of the spread-spectrum QPSK baseband link.
//
// The code (constraint length 7, generators 171 and 133 octal), the
// spreading gain of 16 and the decision depth of 48 are the link's
// published figures; sample widths and amplitudes are this design's choice.
package sdr_pkg;

  // Convolutional code: rate 1/2, constraint length 7.
  localparam int unsigned K        = 7;
  localparam int unsigned NSTATES  = 1 << (K - 1);
  localparam logic [K-1:0] G1      = 7'o171;   // produces X
  localparam logic [K-1:0] G2      = 7'o133;   // produces Y

  // Spreading gain (chips per QPSK symbol).
  localparam int unsigned SF       = 16;

  // Viterbi decision depth (trellis steps before a bit is released).
  localparam int unsigned TB_LEN   = 48;

  // Chip sample format between the transmitter, channel and receiver.
  localparam int unsigned SAMPLE_W = 8;
  localparam int signed   CHIP_AMP = 32;

  // Received code bits carry SOFT_W bits of confidence: 0 is a sure 0,
  // 2**SOFT_W-1 a sure 1; the top bit is the hard decision.
  localparam int unsigned SOFT_W   = 3;

  // Branch metric of the Viterbi decoder.
  typedef enum logic {
    METRIC_HAMMING   = 1'b0,   // hard decisions (top bit of each value)
    METRIC_EUCLIDEAN = 1'b1    // soft values, distance to the ideal level
  } metric_e;

  // Rate selection shared by puncturer and depuncturer.
  typedef enum logic {
    RATE_1_2 = 1'b0,   // no puncturing
    RATE_2_3 = 1'b1    // puncture codes 10 (X) and 11 (Y)
  } rate_e;

  // One received code pair as soft values, with erasure flags for bits the
  // puncturer deleted.
  typedef struct packed {
    logic [SOFT_W-1:0] x;
    logic [SOFT_W-1:0] y;
    logic              x_erased;
    logic              y_erased;
  } code_pair_t;

  // One QPSK symbol as two bits: bit i selects the sign of I, bit q of Q.
  typedef struct packed {
    logic i;
    logic q;
  } qpsk_sym_t;

  // Encoder output for input bit u and the six previous inputs
  // (state[K-2] is the most recent).
  function automatic logic [1:0] conv_out(input logic u, input logic [K-2:0] state);
    logic [K-1:0] r;
    r = {u, state};
    return {^(r & G1), ^(r & G2)};
  endfunction

endpackage
