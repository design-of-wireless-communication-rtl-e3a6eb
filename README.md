# Spread-spectrum QPSK baseband link with a K=7 convolutional code

This is the digital baseband of a small software-defined-radio link, in
synthesizable SystemVerilog. The transmitter protects a bit stream with the
rate 1/2, constraint length 7 convolutional code (generators 171 and 133
octal, the code of IEEE 802.11a/802.16). It punctures the code to rate 2/3,
maps the bits onto QPSK and spreads every symbol over 16 pseudo-noise chips.
The receiver undoes each step: it despreads, turns each QPSK symbol into
two 3-bit soft values, puts null symbols back where bits were punctured,
and recovers the data with a Viterbi decoder whose decisions look 48
trellis steps deep. The link was
specified for a Spartan-3E class FPGA and evaluated over an additive white
Gaussian noise (AWGN) channel. Here the channel sits outside the RTL, between
the transmit and receive chip ports.

```
           TRANSMITTER                                         RECEIVER
src_word -> bit_serializer -> conv_encoder -> puncturer      rx_chip_* -> despreader -> qpsk_demapper
            (P/S, MSB first)  (171/133, K=7)  (codes 10/11)               (16 chips,    (3-bit soft,   
                                                   |                       PN)           I then Q)
                                              qpsk_mapper                      |              |
                                              (2 bits/symbol)            rx_soft_* (monitor)  v
                                                   |                                     depuncturer
                                               spreader -> tx_chip_*                     (nulls as erasures)
                                           (16 PN chips/symbol)                               |
                                                                                       viterbi_decoder
                                                                                       (64 states, depth 48)
                                                                                              |
                                                                                   bit_deserializer -> rx_word
```

`sdr_link_top` holds both chains. `tx_chip_*` and `rx_chip_*` are separate
ports, so a channel model, a loop-back wire or a converter can sit between
them.

## The code and its puncturing

The encoder keeps the last six input bits. For input `u` it forms
`r = {u, state}` and sends `X = ^(r & 7'o171)` and `Y = ^(r & 7'o133)`. The
leftmost tap of each generator is the current bit, so an impulse gives
X = 1111001 and Y = 1011011.

Puncturing works on groups of two encoder pairs. The codes are `10` for X
and `11` for Y, read most significant bit first. So the second X of each
group is dropped, and pairs `X0 Y0, X1 Y1` leave as the three bits
`X0 Y0 Y1`. Two information bits therefore become three channel bits, which
is rate 2/3. The receiver's depuncturer walks through the same codes. It
rebuilds every pair and marks the dropped X as *erased*. The decoder gives an
erased bit no weight, which is what inserting a null symbol means: it
favours no path over another.

The bit stream is then taken two bits at a time. The first bit sets the
sign of I and the second the sign of Q (0 gives +A, 1 gives -A). At rate 2/3
a QPSK symbol does not line up with a puncture group: three bits per two
information bits is 1.5 symbols. The chain is a plain bit stream between the
puncturer and the mapper, so this needs no special handling.

`tx_rate`/`rx_rate` can also select unpunctured rate 1/2. The original
description mentions both rates. Rate 2/3 is the configuration that its
transmitter and receiver models describe in detail, so it is the reset
default.

## Spreading and despreading

Both ends hold the same PN generator: a 5-stage maximal-length LFSR
(x^5 + x^3 + 1, period 31, seed 00001). Each generator advances once per
chip that is actually sent or received. The spreader holds a symbol for 16
chips. Each chip of I and Q is the symbol's sign bit XORed with the PN chip,
sent as a signed 8-bit sample of ±32. The despreader multiplies each
received sample by ±1 according to its own PN chip. It sums 16 of them into
a 13-bit value per axis; its sign is the hard decision.

The demapper sends the I value and then the Q value as one bit each, with a
3-bit confidence `q` from 0 (sure 0) to 7 (sure 1):

    q = clip(3 - floor(v / 128), 0, 7)

where `v` is the despread value. A noiseless symbol gives ±512, so the
steps are a quarter of the signal and `q` reaches 0 or 7 at 3/4 of full
amplitude. The top bit of `q` is exactly the sign of `v` (set when `v` is
negative), so the hard decision is never lost.

The PN sequence is 31 chips long and a symbol is 16, so each symbol sees a
different part of the sequence. The two ends stay aligned because they
reset together and count the same valid chips. **No code acquisition or
tracking is built.** A receiver that starts at another time, or that loses
or gains a chip, stays out of step until both ends are reset. On a real
radio this block would need a synchroniser in front of it.

## The Viterbi decoder

This is the largest block. It decodes in two steps, and the steps are
decoupled by a decision memory.

*Trellis.* The state is the encoder's six-bit memory, with bit 5 the most
recent input. Next state `s' = {u, s[5:1]}` has two predecessors,
`{s'[4:0], 0}` and `{s'[4:0], 1}`. Both carry the same input bit
`u = s'[5]`.

*Step 1: path metrics.* The branch metric compares the received pair with
the pair the branch would produce, taken from the same `conv_out` function
as the encoder. The parameter `METRIC` selects how:

- `METRIC_HAMMING` (default): each bit whose hard decision (top bit of `q`)
  differs costs 1, so a branch costs 0, 1 or 2;
- `METRIC_EUCLIDEAN`: each bit costs its distance from the expected end of
  the 0..7 scale, `q` if a 0 was expected and `7 - q` if a 1 was, so a
  branch costs 0 to 14. This is the linear form of the Euclidean distance;
  for two signal levels the squared distance ranks paths the same way.

An erased bit costs 0 in both modes.

All 64 add-compare-select units work in one clock. Each keeps the smaller
sum, and the first predecessor on a tie. Metrics are 8 bits wide in both
modes. Each step subtracts the smallest old metric, so they stay below 6
times the largest branch cost (84 at most) and never wrap. At reset state 0 starts at 0 and every other state at 28,
because the encoder also starts in state 0.

Every step writes its 64 decision bits (1 means the second predecessor won)
to a 128-entry circular memory. The index of the state with the smallest
metric is written beside them. That index is known only once the next step
arrives, so it is written one step late.

*Step 2: trace back.* Let *f* be the oldest undecoded step. When 57 steps
have their best state stored, the trace-back unit starts at step *f*+55,
from the best state recorded there. It walks back one step per clock,
following `state <- {state[4:0], decision[state]}`. Each clock it reads one
64-bit memory word, with a synchronous read that suits block RAM.

The top bit of each visited state is that step's input bit. Of the 56
steps visited, the last 8 (*f*+7 down to *f*) become output bits. The
youngest of them is therefore decided 48 steps later, which is the
specified trace-back length, and the oldest 55 steps later. The 8 bits are
sent oldest first, one per clock, and *f* moves on by 8.

*Throughput.* One trace back takes 56 clocks for 8 bits. So the decoder
keeps up when trellis steps arrive, on average, at least 7 clocks apart.
The link delivers one every 12 clocks at rate 2/3 and every 16 at rate 1/2.
The memory holds 128 steps, so bursts are absorbed. An assertion flags an
overflow of the memory.

*Latency.* A bit leaves after 49 to about 112 further trellis steps,
depending on where it falls in its block of 8. The decoder needs further
input to push the last bits out. A finite transfer should therefore be
followed by about 64 bits of filler. The six zero tail bits that would end
the trellis in state 0 are not generated.

## Timing, throughput and flow control

- Clock: one clock per chip. The transmit side uses valid/ready handshakes.
  The spreader is the slow end, taking one symbol per 16 clocks, and it
  stalls the source through `src_ready`.
- With a source that always has data, the chip stream has no gaps. One 2-bit
  word takes 24 clocks at rate 2/3 (3 bits = 1.5 symbols) and 32 clocks at
  rate 1/2.
- The receive side has no back-pressure. The despreader delivers a symbol
  one clock after its 16th chip. The demapper sends the I bit and then the Q
  bit in the next two clocks; an assertion checks that symbols are at least
  two clocks apart. The depuncturer sends a pair one clock after the bit
  that completes it. The Viterbi decoder and the deserializer each add one
  register.
- Reset is asynchronous and active low, and it is shared. Releasing it
  together aligns the PN generators and the puncture phases of both ends.

## Switching the code rate

Each of the puncturer and depuncturer samples its rate input only at the
start of a puncture group. A switch is safe when all of the following hold:

1. the source has stopped after an even number of words at rate 2/3 (any
   number at rate 1/2), so that no half QPSK symbol is waiting in the mapper;
2. the transmitter has sent its last chip, and the receiver has despread it;
3. both `tx_rate` and `rx_rate` are then changed before data resumes.

The encoder and decoder keep their state across the switch. The stream
continues, and no bits are lost. The two rate inputs are separate because
the two ends of a real link switch at different times; the link itself
carries no rate signalling.

## Top-level ports (`sdr_link_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | chip clock, asynchronous active-low reset |
| `tx_rate`, `rx_rate` | in | `rate_e` | `RATE_2_3` (default) or `RATE_1_2` |
| `src_word`, `src_valid`, `src_ready` | in/in/out | W=2 | source data, valid/ready |
| `tx_chip_i`, `tx_chip_q`, `tx_chip_valid` | out | 8 | spread chip samples (±32) |
| `rx_chip_i`, `rx_chip_q`, `rx_chip_valid` | in | 8 | received chip samples |
| `rx_soft_i`, `rx_soft_q`, `rx_soft_valid` | out | 13 | despread symbol values, for a constellation display |
| `rx_word`, `rx_word_valid` | out | W=2 | decoded data |

Parameters: `METRIC` (`METRIC_HAMMING` or `METRIC_EUCLIDEAN`, the decoder's
branch metric), `W` (word width, 2) and `ACC_W` (despread value width, 13).

Shared constants and types (`K`, `G1`, `G2`, `SF`, `TB_LEN`, `SAMPLE_W`,
`CHIP_AMP`, `SOFT_W`, `rate_e`, `metric_e`, `code_pair_t`, `qpsk_sym_t`) are in `rtl/sdr_pkg.sv`.

## What follows the original system and what is this design's own

Taken from the original description: the code (K=7, 171/133, rate 1/2);
puncturing to rate 2/3 with codes 10 and 11, and depuncturing with null
symbols; QPSK; PN spreading with gain 16; a two-step Viterbi decoder, with
a Hamming or a Euclidean metric followed by a trace back of length 48; the order of the
blocks; and the Vin/Vout valid signalling of the encoder.

Chosen here, because the description leaves them open:

- word width (2) and bit order (MSB first) at the source and sink;
- the PN polynomial, its length and seed, and one shared chip for I and Q;
- sample width (8 bits) and chip amplitude (±32);
- the QPSK bit-to-axis mapping and sign convention;
- the order of kept bits after puncturing (X before Y);
- one puncturer and one depuncturer that handle X and Y together,
  instead of a separate block (with its own serial-to-parallel stage) per
  encoder output; the same bits are deleted and restored;
- the 3-bit soft values, their step size, the linear form of the
  Euclidean metric, and Hamming as the default metric;
- the trace-back block size (8), the 128-step decision memory, starting
  each trace back from the best state, and the metric width and
  normalisation;
- the valid/ready handshakes, the run-time rate switch and the reset scheme;
- no code acquisition (the ends are aligned by a common reset).

One point of the description can be read two ways: which X of a puncture
group is deleted. This design deletes the second X of each group, so code
10 keeps the first.

In the original system only the transmitter was placed in the FPGA. The
receiver was run in the modelling environment against it, as
hardware-in-the-loop. Here the receiver is RTL as well, so the whole link
can be simulated or built.

Not built: the RF section, ADC/DAC and digital up/down conversion of a
generic SDR; the multicore ARM/DSP processor of the development platform;
the channel itself. The channel is a behavioural model in `tb/awgn_channel.sv`.

## Size

After coarse synthesis the link has about 700 flip-flop bits (with either metric), 512 of them
path metrics. The decision memory adds 8,960 bits (128 x 70), which fits in
one 18 Kbit block RAM. The transmitter alone is about 30 flip-flops. That
is far below the 9,312 flip-flops and 20 block RAMs of an XC3S500E. The
LUT cost of the 64 add-compare-select units has not been estimated.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints one line,
`TB_RESULT checks=N failures=M`. The end-to-end bench runs the top at its
default parameters. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/sdr_pkg.sv tb/tb_sdr_link_top.sv --top-module tb_sdr_link_top
./obj_dir/Vtb_sdr_link_top
```

Replace the testbench name to run another block. `tb_sdr_link_top` runs
these phases:

1. A clean channel at rate 2/3. Every word must come back, and the chip
   stream must have no gaps: 400 words are 9,600 chips in 24 clocks per
   word.
2. Rate 1/2 with light noise.
3. Rate 2/3 with noise that causes raw decision errors, all of which must be
   corrected.
4. A noise sweep that prints raw and decoded error counts.

It also counts source stalls, rate switches and punctured bits, and fails
if any of them never happened. One run with the default seed gave:

| chip SNR (σ) | raw bit errors (despread, hard) | decoded bit errors |
|---|---|---|
| +6.0 dB (16) | 0 / 1200 | 0 / 800 |
|  0.0 dB (32) | 0 / 1200 | 0 / 800 |
| −3.5 dB (48) | 1 / 1200 | 0 / 800 |
| −6.0 dB (64) | 18 / 1200 | 0 / 800 |
| −8.0 dB (80) | 78 / 1200 | 107 / 800 |

Chip SNR here is 20·log10(32/σ) per axis, before the 12 dB processing gain
of the 16-chip despreading. The 8-bit channel model clips at ±127, which
worsens the two noisiest levels. At the last level the raw error rate
(6.5 %) is beyond what a rate 2/3 code can correct with hard decisions
(the capacity of such a channel is about 0.65 bit per channel bit), so the
decoder fails in bursts and makes more errors than it receives. Treat
these counts as a sanity check, not a BER curve: each point rests on a few
hundred bits.

`tb_metric_compare` runs two copies of the link on the same noisy chips,
one with each metric, at rate 2/3 over six noise levels of 500 words. It
checks that both are error-free at the cleanest level and that the
Euclidean copy makes no more errors in total. One run gave:

| chip SNR (σ) | decoded bit errors, Hamming | decoded bit errors, Euclidean |
|---|---|---|
| +6.0 dB (16) to −6.0 dB (64) | 0 / 1000 each | 0 / 1000 each |
| −8.0 dB (80) | 131 / 1000 | 0 / 1000 |
| −9.5 dB (96) | 344 / 1000 | 117 / 1000 |

The soft metric gains roughly 1.5 to 2 dB here, about what 3-bit soft
decisions are expected to give.

The block testbenches check, against models written independently in the
bench:

- the encoder's impulse response and random streams, from explicit tap
  positions;
- the puncture and depuncture patterns across rate switches;
- the LFSR recurrence, its period and its balance;
- chip values and gap-free spreading;
- exact despread sums and their one-clock latency;
- demapper decisions, soft values and their timing;
- the decoder's decision depth (no bit before 48 later steps) and its
  latency bound, and error-free decoding with sparse channel errors and
  with erasures; with the Euclidean metric, also error-free decoding when
  extra bits are flipped but received with low confidence.
