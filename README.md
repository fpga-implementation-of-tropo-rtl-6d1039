# Tropo-scatter modem baseband in SystemVerilog

A troposcatter link bounces a microwave signal off the troposphere. The received signal fades deeply and
arrives with a carrier frequency error, so a modem for it must do three things:
- find the start of each burst;
- remove the frequency error before any per-subcarrier processing;
- combine several diversity receivers.

This RTL implements the digital baseband blocks of such a modem for a 20 MHz sample clock:

| Part | Top of the part | What it does |
|------|-----------------|--------------|
| OFDM receiver front end | `top_connect` | Schmidl-Cox burst detection, frequency-offset estimation with a CORDIC, per-sample derotation, and removal of the cyclic prefixes. It hands 9 bursts of 512 samples per frame to channel estimation. |
| MIMO combining | `mimo_combiner` | Aligns the channel-corrected streams of up to four receive chains, masks chains the user has disabled, and adds the rest with saturating adders for the LDPC decoder. |
| Output interface | `final_fifo` | Takes the hard-decision bits of the decoder's LLR words, packs them into bytes, descrambles them with a 64-bit LFSR, and buffers them in a FIFO with a threshold flag. |
| SC-FDMA transmitter | `scfdma_tx` | Turns 1152 QPSK symbols from the channel encoder into an 1866-word frame: padding, pilots, cyclic prefixes, preamble and channel-estimation header. |
| SC-FDMA receiver input | `scfdma_rx_memstore` | Buffers a received SC-FDMA frame. It releases the channel-estimation pilots, then feeds each data symbol to an external FFT core and passes the results on. |

`modem_top` places the five parts side by side on one clock and one synchronous reset (`sclr`).

These parts are not included:
- FFT/IFFT cores;
- channel estimation and correction;
- the LDPC encoder and decoder;
- the OFDM transmitter;
- the SC-FDMA receiver beyond its input buffer, including its preamble detector.

Their signals appear as ports of `modem_top`.

## Frame formats

OFDM frame (receive side), one complex 16-bit sample per clock:

```
| preamble 64 = A A (A: 32 samples) | CP 32 | symbol 0 (512) | CP 32 | symbol 1 | ... | symbol 8 |
                                     \__ 4960 samples in total, 9 x 384 data subcarriers __/
```

- 9 × 384 = 3456 QPSK symbols carry 6912 coded bits.
- At code rate 2/3, that is 4608 message bits (576 bytes) per frame.

SC-FDMA frame (transmit side), 1866 words:

```
| pre-CP 10 | preamble 32+32 | CE-CP 32 | CE pilots 128 | CP 32 | sym 0 (512) | CP 32 | sym 1 | CP 32 | sym 2 |
  \______________ header, 234 words __________________/
```

- Each symbol holds 32 pilots and 480 data words.
- 1440 data words = the 1152 encoder symbols plus 288 pad symbols.

Numbers are two's complement:
- samples: 16 bits;
- angles: 32-bit 3.29 radians (3 integer bits, 29 fraction bits);
- sine/cosine: 16-bit 2.14;
- QPSK amplitude: 11585 (1/√2 in 2.14).

## Receiver front end: detection, phase, and the timing that makes them meet

This is the most delicate part of the design. Read it before changing any latency.

### Schmidl-Cox correlator (`topmsandc`)

The preamble is two identical 32-sample halves. Take the stream x(n).

1. Two 32-deep shift registers per rail (`register_bank`, built from `shift_reg`) give the taps
   x(n), x(n−32) and x(n−64).
2. `correlator` forms five products per cycle:
   - the energies |x(n)|², |x(n−32)|², |x(n−64)|²;
   - the cross products x*(n)·x(n−32) and x*(n−32)·x(n−64).
3. `adder_subtractor` turns each pair into "value entering the window minus value leaving it".
4. Four `accumulator`s then hold 32-sample sliding sums, with no need to recompute the window:
   - the energies ac1 and ac2 of the newer and older 32-sample windows;
   - their cross-correlation P.
5. `comp` tests |P|²·2¹⁶ ≥ threshold·ac1·ac2. The threshold is a Q0.16 fraction taken at run time, so
   the metric is normalized without a divider.

Detection rule in `comp`:
- A run of samples above the threshold is a preamble if it lasts at least `SAFETY` (4) cycles.
- While the run lasts, the largest |P|² and the matching P and write address are kept.
- When the run ends, `packet` pulses and the kept values are reported. A run ends at the first sample
  below the threshold, or after `RUN_MAX` samples.

The peak is where the two halves line up exactly. Deciding a fixed number of cycles after the
threshold crossing does not work: with a threshold of 0.7 the crossing comes about 5 samples before the
peak.

`location` is a write-address counter sampled at the peak. It runs in step with the memstore write
address, so it is the address of the first sample after the preamble. A vectoring CORDIC
(`cordic_vector`) turns P into `phase`:
- the angle is −32·ω for a frequency offset of ω rad/sample;
- its latency is 21 cycles: a quadrant stage plus 20 iterations.

### Control and buffering (`topfsm_ctrl`, `memstore`, `top_fsm`)

`memstore` is a 256-word circular buffer written every cycle. The control FSM sequences a frame from
the packet pulse (cycle p):

| State | Cycles | Action |
|-------|--------|--------|
| S0 | until `packet` | search |
| S1 | p+1 … p+21 | `clr` (first cycle) empties the correlator for the next frame; wait for the CORDIC |
| S2 | 21 cycles | `freq_enable` rises at p+22 and stays high for 4864 cycles |
| S3 | 4864 cycles | memstore read, starting at `location + 32` so the first cyclic prefix is skipped; `frame_done` at the end |

`freq_correct` has a latency of 22 cycles. The memstore read therefore starts 21 cycles after
`freq_enable`, and its registered output appears on the 22nd. An assertion in `top_connect` checks
that the sample and its sine/cosine arrive together (`corr_enable == data_valid`).

### Frequency correction (`freq_correct`, `freq_correct_mult`)

1. While `freq_enable` is high, a counter n runs 0…4863.
2. θₙ = (phase >>> 5)·n: the per-sample offset is the 32-sample phase divided by 32.
3. θₙ is reduced to ±π by subtracting round(θₙ/2π)·2π, computed with a fixed-point 1/2π.
4. A rotation-mode CORDIC (`cordic_rotate`) gives cos θₙ and sin θₙ.
5. `freq_correct_mult` multiplies the sample by cos θₙ + j·sin θₙ, shifts right by 14 and saturates.

The sign convention: P = Σ x*(n)·x(n−32) gives −32ω, so the rotation by +θₙ cancels the offset.
Step 3 is needed because θₙ grows to hundreds of radians over a frame, while the CORDIC converges
only within ±π.

### Channel-estimation interface (`channel_est_fsm`)

- The corrected stream is written into a 1024-word RAM.
- 64 cycles after `channel_enable` rises, the FSM reads 9 bursts of 512 samples with 64 idle cycles
  between them. These are the cycles channel estimation needs per symbol.
- After each burst the read address jumps over the next symbol's cyclic prefix.
- The reader is slower than the writer, so the 9th symbol is read after the input has ended. The
  writer leads by at most about 330 words.

## MIMO combining (`mimo_combiner`, `clip_tree`, `clip_add`)

- Each of 4 chains writes its valid words into its own RAM. The write address wraps at 3456, one frame.
- The first valid word of any enabled chain (`in_valid & rx_valid`) starts the FSM:
  - S1 waits 10 cycles, so chains that arrive a few cycles late have started too, then latches the
    set of active chains;
  - S2 reads 384 words and S3 idles 192 cycles, for 9 symbols.
- Inactive chains are forced to zero.
- The four streams are added in a tree of three saturating adders. The adders clip to 0x7fff/0x8000
  instead of wrapping.

## Output interface (`final_fifo`, `lfsr64`, `sync_fifo`)

- Each 21-bit decoder word holds three 7-bit LLRs. Their sign bits (20, 13, 6) are the message bits.
- After 8 words the 24 collected bits are copied out ("pack") and sent as three bytes in the next
  three cycles, most significant first.
- Each byte is XORed with the low byte of a 64-bit LFSR, bit-reversed. The LFSR steps once per byte.
- The bit reversal is needed because the transmitter scrambles bytes LSB-first, while the receiver
  rebuilds them MSB-first.
- `full` rises at `THRESH` (32) bytes, so an external reader can then drain the FIFO.

## SC-FDMA transmitter (`scfdma_tx`)

Adjacent stages use a two-wire handshake. A stage with data raises `send`; the next stage answers
with `take` when it is free; data then flows with a `valid` strobe.

1. **`qpsk_mapper`**: bit 0 gives the I sign and bit 1 the Q sign (0 maps to +, 1 to −).
2. **`sc_extension`** stores 1152 symbols and sends 1440: the stored ones, then the pad symbol
   (+A,+A). Output may start as soon as the first word is stored; an assertion checks that a word is
   never read before it is written.
3. **`sc_pilot`** stores 1440 words. For every cycle its `take_in` is high it sends one word, a cycle
   later, of three 512-word symbols: the pilot (+A,−A) at every 16th position from 0, data in between.
4. **`sc_cyclic_prefix`** keeps one 512-word buffer:
   - it requests a symbol with `take_out` and stores it;
   - it sends the last 32 words, then all 512;
   - while sending word k it already requests word k of the next symbol, which is written one cycle
     later, just after word k has been read;
   - the output is one gap-free run of 3 × 544 words.
5. **`sc_preamble_adder`** sends the 234-word header while the data passes through a 234-deep delay
   line. The data leaves the delay line right behind the header.

## SC-FDMA receiver input buffer (`scfdma_rx_memstore`)

In SC-FDMA the channel-estimation pilots are a separate 128-sample block after the preamble, not
mixed into the data. The receiver therefore handles a frame in two passes, and the buffer must hold
the whole frame between them:
- every sample is written into a 2048-word circular RAM, addressed by time as in `memstore`;
- `enable` with `location` (the first address after the preamble) sends the 128 pilots, skipping
  their 32-sample prefix (state `ST_SEND_CEM`);
- `fft_start` then sends each of the 3 data symbols, prefix skipped, as one 512-sample burst to an
  FFT core (`ST_SEND_FFT`). `fft_in_first` marks the first sample;
- the core answers with `fft_ready` for one cycle followed by 512 results, which are passed on
  (`ST_SEND`). Then the next symbol goes out, and `done` follows the last result.

The buffer counts the samples written since `location` and never reads ahead of the writer:
- pilots are read as they arrive;
- a symbol is released only once all 512 of its samples are stored, so each FFT burst has no gaps.

It cannot detect being lapped. The frame after the preamble (1792 samples) must be read before 2048
newer samples arrive.

## Choices this design makes where the description is silent

- **Detector metric and peak search:** the normalized metric with a Q0.16 threshold, the safety count
  of 4, peak search over the whole above-threshold run, and `RUN_MAX` = 64.
- **Phase scaling:** the division of the phase by 32 and the modulo-2π reduction before the rotation
  CORDIC. The original took this scaling from a C model that is not available.
- **Latencies:** the CORDIC has one pipeline stage per iteration plus a quadrant stage. The control
  waits are derived from `ITER`, not fixed at the original's 18/19 cycles.
- **Memory sizes:**
  - memstore: 256 words;
  - channel-estimation RAM: 1024 words (at least 576 are needed);
  - MIMO RAMs: 4096 words per rail;
  - output FIFO: 1024 bytes, threshold 32.
- **Scrambler:** the polynomial x⁶⁴+x⁶³+x⁶¹+x⁶⁰+1 and the seed 0xACE1_2468_1357_9BDF.
- **SC-FDMA contents:** the pad symbol, the pilot positions and value, and the header. The header is
  QPSK from a 16-bit LFSR (x¹⁶+x¹⁴+x¹³+x¹¹+1, seed 0xACE1), two bits per symbol. The real sequences
  were read from files that are not available.
- **Hard decision:** the sign bit of each LLR is the message bit, and bit 20 is the first of the three.
- **SC-FDMA receiver:**
  - the buffer holds 2048 words;
  - the symbol count is 3, as in the transmitted frame, although the description of the receiver
    speaks of 4 symbols;
  - the FFT handshake marks the first input sample and expects results right after `ready`;
  - enable and location are inputs, because the receiver's detector is not instantiated.
- **Fixed-point handling:** the multiplier saturates, and the cross-correlation is scaled to the
  32-bit CORDIC by dropping 7 LSBs.

## Simulation

Each block has a self-checking testbench `tb/tb_<module>.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs. From the repository root:

```
verilator --binary --timing -Wno-fatal -I. -Irtl -y rtl +libext+.sv \
    rtl/modem_pkg.sv tb/tb_modem_top.sv --top-module tb_modem_top -o sim
./obj_dir/sim
```

With `-Wall`, verilator's lint reports a few warnings that are intended:
- two outputs are left open: the detector's `location`, whose copy in the control FSM is used
  instead, and the output FIFO's fill count;
- the magnitude bits of the LLR words are unused;
- a block does not use every constant of `modem_pkg`.

Testbenches include `tb/tb_util.svh` (check counters and watchdog). The receiver testbenches also
include `tb/ofdm_gen.svh`, a model of a received frame:
- random QPSK-like samples;
- a repeated 32-sample preamble half;
- 9 symbols with cyclic prefixes;
- a carrier offset applied in floating point.

### End-to-end test (`tb_modem_top`)

`tb_modem_top` runs `modem_top` at its default sizes in about 15 s of simulation. For each of two
frames with different frequency offsets:

1. A random 576-byte message is scrambled and QPSK-mapped onto the data positions of 9 OFDM symbols.
   The scrambling is the inverse of the receiver's descrambler.
2. The frame is received. The testbench checks the corrected samples against the ideal ones.
3. Simple stand-ins replace the missing blocks:
   - for channel estimation: common-phase removal using pilots;
   - for the LDPC decoder: LLRs of the systematic bits.
4. The data passes through four receive chains with different gains and skews. One chain is
   disabled in the first frame and one is silent in the second.
5. The combiner and output interface run, and the bytes read out must equal the message.

In parallel, an SC-FDMA frame is built and compared word by word. The frame is then looped back into
the SC-FDMA receiver buffer. An FFT stand-in echoes each symbol, and the pilots and symbols must match
what was sent. The test counts each mechanism:
- detection, prefix skipping, frequency correction, symbol gaps, the late 9th symbol;
- skew alignment, chain masking, clipping;
- byte packing, the FIFO threshold, emptying;
- header, prefix, pilot and pad words;
- pilots released and symbols passed through the FFT on the receive side.

A mechanism that never occurred counts as a failure.

### How far to trust it

- All numbers are checked against references computed in the testbenches: floating-point trigonometry,
  integer models of the arithmetic, queue models of the buffers.
- The sizes are the defaults.
- The stimulus is noise-free. The detector was not characterised against noise or multipath, and the
  threshold of 0.7 used in the tests is not a value from the original design.
- The samples next to the preamble in the frame model are chosen so that the correlation peak is
  unique. With a random neighbour the peak can be flat over two samples, and the detector then picks
  the first.
- Timing closure at 20 MHz was not checked.
