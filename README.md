# IEEE 802.11a OFDM baseband processor with built-in self-test

This is synthesizable SystemVerilog for the digital baseband of an IEEE 802.11a
transceiver (6 to 54 Mbit/s, 64-point OFDM). It covers both directions:

- the transmitter turns MAC bytes into 20 Msample/s complex baseband samples;
- the receiver turns samples, including a carrier frequency offset, back into bytes.

Three ideas shape the design.

1. **Token flow with clock gating.** Blocks pass data with valid/ready
   handshakes. Whole groups of blocks sit in their own gated clock domains, and
   a small mode controller switches those domains on only while they have work.
2. **Decision-directed channel estimation.** The receiver re-encodes,
   re-interleaves and re-maps its own decoded bits. That gives reference points
   X, and the channel estimate H = Y / X is refreshed on every data symbol. One
   division unit equalises the data and a second one computes the new estimate.
3. **Built-in self-test instead of scan.** Each direction has a pattern
   generator at its input and four signature registers along its datapath. One
   pin, `bist_ok`, reports the result: one pulse for each internal check that
   passes, then a final level for the output check.

## Block diagram

```
 MAC bytes ─► input FIFO ─► scrambler ─► conv. encoder ─► interleaver ─► mapper ─► pilot insert ─┐
              SIGNAL field generator ──┘                                                          │
                                                                             ┌── IFFT/FFT (shared)◄┘
 DAC samples ◄─ preamble insert ◄─ guard insert ◄────────────────────────────┤
                                                                             │
 ADC samples ─► tracking: autocorrelator ─► plateau detector ─► CORDIC (vectoring) ─► offset
            └─► processing: NCO (CORDIC rotation) ─► XNOR cross-correlator ─► GI removal ─┘
                                                                             │ FFT output
                    ┌────────────────────────────────────────────────────────┘
                    ▼
  channel estimator / equaliser (division) ─► demapper ─► deinterleaver ─► Viterbi ─► descrambler ─► bytes
        ▲  H = Y / X                                                         │
        └── mapper ◄── interleaver ◄── conv. encoder ◄───────────────────────┘  (re-encoding loop)
```

`baseband_top` holds the following:

- the `transmitter` and the `receiver`;
- one `fft64` that both directions share;
- the `power_ctrl` mode controller and four `clock_gate` cells;
- the two BIST controllers with their pattern sources.

## Clocking, modes and power

The design has one input clock `clk`, meant to be 80 MHz. Sample-rate work
(20 Msample/s) is paced by an internal clock enable that fires every fourth
cycle. Bit-serial blocks such as the encoder, interleavers, Viterbi decoder and
scrambler run one bit per `clk`.

`power_ctrl` has three modes. The gated domains on `clk_en[3:0]` follow the mode:

| mode   | Tx domain | FFT domain | Rx tracking | Rx processing |
|--------|-----------|------------|-------------|---------------|
| SEARCH | off       | off        | on          | off           |
| RX     | off       | on         | off         | on            |
| TX     | on        | on         | off         | off           |

- **SEARCH** is the idle state. Only the tracking synchronizer runs, looking for
  a preamble.
- **RX** is entered when a frame is detected. It is left when the frame's last
  byte has been delivered or the frame fails.
- **TX** is entered on `tx_req`. It is left when the last sample has gone out.

Each domain is driven by a latch-based gate (`clock_gate`). In BIST,
`test_en` forces every gate on. The enables come from flip-flops, and each
start pulse is issued in the first cycle of the newly enabled domain. Logic
that is switched off therefore simply freezes. Buffers that could hold stale
data from an interrupted frame are cleared synchronously when the next frame
starts.

## Transmitter

`tx_req` latches RATE, LENGTH and the scrambler seed. The controller then sends
the symbols in this order:

1. The SIGNAL field: 24 bits at rate 1/2, BPSK, not scrambled.
2. SERVICE + PSDU + tail + pad through the scrambler. The tail bits are forced
   to zero after scrambling.

The rest of the transmit path works as follows:

- The encoder emits punctured coded bits.
- The interleaver works one OFDM symbol at a time, with ping-pong banks.
- The mapper produces Gray points scaled so that 8192 = 1.0.
- `pilot_insert` builds all 64 bins, in the order k = -32..31. It adds the four
  pilots with the polarity sequence of the standard's pilot scrambler.
- The IFFT divides by 2 in each stage.
- `guard_insert` adds the 16-sample cyclic prefix.
- `preamble_insert` sends the 320 training samples first. It then passes one
  sample per sample tick. If data is missing at a tick, it flags
  `tx_underrun`.

A frame of N DATA symbols is exactly 320 + 80·(N + 1) samples long.

## Receiver

**Tracking (always on while searching).**

- `autocorrelator` keeps running sums over 16 samples at lag 16:
  - the correlation C = Σ r(n)·r*(n−16);
  - the power P = Σ |r(n)|².
- `plateau_detector` declares a frame when |C| stays above 6/8·P for 32
  consecutive samples, i.e. during the repeated short symbols.
- A vectoring CORDIC takes the angle of the held C. That angle divided by 16 is
  the phase step per sample of the carrier offset. The range is ±625 kHz.

**Processing (from detection to end of frame).**

- An NCO accumulates that step. A rotation CORDIC removes it from every sample.
- `xcorr_xnor` compares the sign bits of the last 64 corrected samples with the
  sign bits of the long training symbol. Each ±1 product is one XNOR gate, and
  each sum is a count of ones. The score is |Re| + |Im| of the complex sign
  correlation, so a constant phase left after correction does not matter.
- When the score passes 96 out of about 128, the second long training symbol
  has just ended. Its 64 samples are what the synchronizer saved in its delay
  line.
- The synchronizer then sends that symbol to the FFT, followed by every 80-sample
  symbol with its guard interval removed.

**Channel estimation and equalisation** (`channel_estimator`, `cdiv`).

1. The first FFT output, the long training symbol, gives the initial estimate
   H[k] = Y[k]·L[k].
2. Each later data bin is divided by H in the equaliser's division pipeline and
   queued for the demapper.
3. Its raw value Y is kept in the CE buffer, a FIFO.
4. The decoded bits return through the re-encoding loop (encoder, interleaver,
   mapper) as points X. Each X is paired with the oldest buffered Y, and the
   second divider writes H[k] = Y / X.

The estimate used for symbol i therefore comes from symbol i − D, where D is
the loop delay, which is about two symbols. Because the estimate is refreshed
continuously, it also follows slow phase drift.

The divider forms a·conj(b) and |b|², then runs two pipelined restoring
dividers. It has a latency of 19 cycles and gives one result per cycle.

**Decoding.**

- The hard-decision demapper feeds the deinterleaver.
- The Viterbi decoder has 64 states and register-exchange survivors with a
  depth of 42. At the end of each block it flushes from state 0.
- The SIGNAL symbol is decoded first. The frame controller checks its parity,
  sets RATE and LENGTH, counts the DATA symbols, and only then lets the
  DATA symbols through the equaliser.
- The descrambler takes its state from the first seven SERVICE bits.
- Bytes come out on `rx_byte_valid` / `rx_byte`. `rx_done` follows the last
  byte. `rx_fail` means one of two things: timing was not found within 480
  samples of detection, or the SIGNAL field was invalid.

## Built-in self-test

`bist_start` runs one of the two tests, selected by `bist_sel`.

- **Transmitter test (`bist_sel = 0`).**
  - The LFSR pattern generator stands in for the MAC bytes of a 20-byte,
    36 Mbit/s frame.
  - Signature registers (MISRs) watch:
    - the scrambler output;
    - the interleaver output;
    - the mapper output;
    - the DAC samples.
- **Receiver test (`bist_sel = 1`).**
  - `rx_tpg` feeds the receiver with the preamble, then a valid SIGNAL symbol
    (6 Mbit/s, 6 bytes, built at elaboration), then LFSR noise symbols.
  - This gets the pattern past the synchronizer, the SIGNAL decoder and into
    the deeper pipeline.
  - Signature registers (MISRs) watch:
    - the FFT input;
    - the equaliser output;
    - the deinterleaver output;
    - the descrambler output.

At the end of a test, `bist_ctrl` compares the four signatures with the
expected values in the top's parameters (`TX_SIG*`, `RX_SIG*`):

- it gives one `bist_ok` pulse for each matching internal signature (three if
  everything is right);
- it then holds `bist_ok` at the result of the output signature until the next
  test.

The expected values are the signatures of a correct design. **Any change to
the datapath changes them.** After such a change, rerun `tb_baseband_top`:

- it prints the new signatures;
- copy them into the parameter defaults.

## Numeric formats

| quantity | format |
|---|---|
| time-domain samples | 16-bit signed I/Q (`cplx_t`) |
| frequency-domain points | 8192 = 1.0 |
| 16-QAM / 64-QAM points | multiples of 2591 / 1264 |
| FFT internal words | 20 bits, Q1.14 twiddles |
| phase (NCO, CORDIC) | 16 bits per turn |

The receive FFT is unscaled, so the transmit IFFT's 1/64 makes a loopback
symbol come back at its original size.

## Where this design departs from the original architecture

- **Single autocorrelator.** Detection and the offset estimate share one lag-16
  autocorrelator. The original uses two autocorrelators for a wider offset
  range. The range here is ±625 kHz, which covers the ±80 ppm target at
  5.8 GHz. There is no fine offset estimate from the long training symbols.
- **No pilot-based residual phase correction.** The pilots are transmitted
  correctly, but the receiver does not use them. Phase drift is followed only
  by the decision-directed update.
- **One input clock.** The design uses one clock plus a 1-in-4 sample enable
  instead of separate 20 MHz and 80 MHz clocks. The gated domains are
  per function (Tx, FFT, Rx tracking, Rx processing).
- **Sizes chosen by this design.** All widths, buffer depths, thresholds, the
  Viterbi depth, LFSR polynomials and the BIST pulse code are this design's
  own choices. The standard fixes the codes, tables and sequences.

## Files

- `rtl/bb_pkg.sv` holds the shared types and constants. It also has
  constant functions that compute the training sequences, twiddles and the
  interleaver permutation at elaboration.
- Every other `rtl/*.sv` file holds one module named after the file.
  `udiv_pipe` is a helper of `cdiv`.
- `tb/tb_<module>.sv` are self-checking testbenches. Each prints
  `TB_RESULT checks=N failures=M`. The composite blocks (`transmitter`,
  `receiver`, `synchronizer`, `channel_estimator`) and `preamble_insert` and
  `rx_tpg` have no testbench of their own; they are exercised only through
  `tb_baseband_top`.
- `tb_baseband_top` is the end-to-end test. It uses the default parameters and:
  - transmits and receives frames at 6, 18, 36 and 54 Mbit/s with frequency
    offsets from −120 kHz to +200 kHz;
  - includes a 43-byte frame followed by a 14-byte acknowledge;
  - runs both BISTs;
  - fails if any mechanism never happens: clock gating, detection, timing,
    channel updates, mode switches, BIST pulses.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/bb_pkg.sv tb/tb_baseband_top.sv \
          --top-module tb_baseband_top -Mdir obj -o sim
./obj/sim +verilator+rand+reset+2
```

Replace `tb_baseband_top` with any other testbench to run a single block. The
testbenches reset everything they read, so they also pass with random initial
state (`+verilator+rand+reset+2`). The full end-to-end run takes well under a
minute.
