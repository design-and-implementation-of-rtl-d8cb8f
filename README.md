# DMT modulator for DSL: complex and real transmission

Discrete multitone (DMT) modulation splits a line's bandwidth into many narrow
sub-channels ("tones"). Each tone carries one QAM symbol per DMT symbol, and an
inverse FFT turns the whole set of tones into one block of time samples. A
cyclic prefix, which is a copy of the block's tail, goes in front of each block
so that echoes on the line do not smear one symbol into the next.

This RTL has two variants of the modulator, side by side in `dmt_top`:

| | complex transmission | real transmission |
|---|---|---|
| QAM order | 256-QAM (8 bits per tone) | 128-QAM (7 bits per tone) |
| data tones per symbol | 256 (all IFFT bins) | 127 (tones 1 .. 127) |
| IFFT | 256 points | 256 points (2N, N = 128) |
| cyclic prefix | 32 samples | 32 samples |
| output | I and Q samples, for a quadrature up-converter | one real sample stream, for a single wire pair |

For real transmission, a 2N-point IFFT with a conjugate-symmetric input makes
the output real. Bin 2N-k carries the complex conjugate of bin k, and the DC
and Nyquist bins are zero. One wire then carries N-1 tones, at the cost of an
IFFT twice as large.

## Signal chain

```
bit_in ─► serial_to_parallel ─► QAM mapper ─► frame_assembler ─┬───────────────────────┬─► ifft_radix2
          (8 or 7 bits)         256 / 128     (one frame of    │ real only:            │   (256 points,
                                                tones)         └─► conjugate_mirror ───┘   parallel in/out)
                                                                                               │
                 samples ◄─ cyclic_prefix ◄─ parallel_to_serial ◄──────────────────────────────┘
                           (32 + 256 out)    (256 samples, one per clock)
```

`dmt_transmitter` (parameter `REAL_TX`) builds one chain. `dmt_top` holds one
chain of each kind. The two chains share only clock and reset.

| file | block |
|---|---|
| `rtl/dmt_pkg.sv` | sizes, fixed-point constants, bit reversal, twiddle generator |
| `rtl/serial_to_parallel.sv` | enabled delay line with a symbol strobe |
| `rtl/qam256_mapper.sv` | 8 bits to a square Gray-coded 256-QAM point |
| `rtl/qam128_mapper.sv` | 7 bits to a 128-QAM cross point |
| `rtl/frame_assembler.sv` | gathers a frame of tones and hands it to the IFFT |
| `rtl/conjugate_mirror.sv` | Hermitian extension for real transmission |
| `rtl/ifft_radix2.sv` | in-place radix-2 inverse FFT |
| `rtl/parallel_to_serial.sv` | holding register and serialiser |
| `rtl/cyclic_prefix.sv` | frame buffer and prefix insertion |
| `rtl/dmt_transmitter.sv` | one complete chain |
| `rtl/dmt_top.sv` | both chains |

All state changes on the rising edge of `clk`. Reset is synchronous and
active high.

## Bits to tones

**Serial to parallel.** Each bit presented with `bit_en` high shifts into a
chain of `BITS` registers. `taps[0]` (Out1) is the newest bit. Read as a
number, `taps` is the symbol, with the first-received bit as its MSB. A
modulo-`BITS` counter pulses `sym_valid` for one cycle after every `BITS`-th
accepted bit.

**256-QAM.** The high nibble selects the in-phase level and the low nibble the
quadrature level. Each nibble is the Gray code of a position p = 0..15. The
levels are I = 2p - 15 and Q = 15 - 2p, so neighbouring points differ in one
bit. For example, bits `8'b0000_0010` map to -15 + 9j.

**128-QAM.** The 128 points are the odd 12 × 12 grid from -11 to 11, minus
its four 2 × 2 corners. Symbol k is the k-th point when you count column by
column from I = -11, and inside each column from Q = 11 downwards. This order
is a plain table, not a Gray code. Replace `cross_point()` in
`qam128_mapper.sv` if a different bit-to-point table is needed.

Both mappers output 6-bit signed levels, one clock after their input.

**Frame assembly.** The mapper's points are written into a register file in
arrival order: 256 entries for complex, 127 for real. When the last entry of a
frame is written, `frame_valid` pulses and the IFFT loads the whole frame in
that cycle. The assembler can therefore start the next frame at once. If the
IFFT is still busy at that moment, the frame is dropped and `overrun` pulses.

**Conjugate extension (real only).** Tone t of the 127-entry frame goes to
bin t+1. Its conjugate goes to bin 256-(t+1). Bins 0 and 128 are zero.

## The inverse FFT

`ifft_radix2` is a sequential, in-place, radix-2 decimation-in-time
transform. It is the most involved block.

- **Load.** `start` copies all 256 bins, in one clock, into a register file of
  complex words at bit-reversed addresses. Each 6-bit level is scaled by 2^9
  into a 16-bit word.
- **Butterflies.** One butterfly runs per clock: 8 stages of 128 butterflies,
  so 1024 clocks. In stage s (span h = 2^s), butterfly b with p = b mod h
  combines words i = (b / h)·2h + p and i + h with W = exp(+j·2π·p / 2h):
  `t = X[i+h]·W`, `X[i] = (X[i] + t)/2`, `X[i+h] = (X[i] − t)/2`.
- **Scaling.** Halving in every stage means the words never grow. The result
  is the normalised inverse DFT

  x(n) = 2^9 · (1/256) · Σ_k X_k · exp(+j·2π·k·n/256),

  so one output LSB is 1/512 of a QAM level. For a real-transmission frame
  this equals 2^9/256 · 2 · Σ_{k=1}^{127} [a_k cos(2πkn/256) − b_k sin(2πkn/256)],
  and the imaginary part is zero up to rounding.
- **Precision.** Twiddles are Q14, 16 bits wide. Products are rounded to
  nearest and the halvings truncate. Against a floating-point inverse DFT, the
  error stays within a few LSB. The testbenches allow 6 to 8 LSB.
- **Twiddle table.** The table (128 cos/sin pairs) is built while the design
  is elaborated. `dmt_pkg::twiddle()` uses integer arithmetic only: a Q30
  Taylor series on the first quadrant, with the second quadrant obtained by
  symmetry. No real-valued system function is involved.
- **Interface.** `busy` is high while the transform runs. `done` pulses
  1025 clocks after `start`. After that, `out_re`/`out_im`, the register file
  itself, hold the 256 time samples until the next `start`.

`LOG2N` resizes the transform. The rest of `dmt_pkg` (`NFFT`, `LOG2NFFT`) has
to follow if a transmitter is built at another size.

## Samples out

`parallel_to_serial` copies the finished frame into its own holding register
on `done`. This frees the IFFT for the next frame. It then sends sample 0 to
255, one per clock.

`cyclic_prefix` stores the 256 serial samples. It then sends 288 samples:
first 224 .. 255 (the prefix, with `out_first` on the first of them), then
0 .. 255 (`out_last` on the final one). In the real chain, both blocks are
built without the imaginary rail (`COMPLEX = 0`).

## Timing and rates

- **Latency.** From the cycle that presents a frame's last bit to the cycle
  with `out_first` is 1285 clocks: 1 (S/P) + 1 (mapper) + 1 (frame) + 1025
  (IFFT) + 256 (P/S) + 1 (prefix).
- **Input rate.** The IFFT is busy for 1025 clocks per frame. A complex frame
  needs 2048 bits, so `bit_en` may be high on every clock. A real frame needs
  only 127 × 7 = 889 bits, so `bit_en` may be high at most every second clock.
  Feeding the real chain faster loses every other frame and raises
  `real_overrun`.
- **Output rate.** Output comes in bursts of 288 samples at the clock rate. A
  DAC running at a fixed sample rate (2.208 MHz in a typical ADSL set-up)
  needs an output FIFO, which is not included. At that rate, one DMT symbol
  lasts 288 / 2.208 MHz = 130.4 µs. Any clock of about 8 MHz or more then
  keeps up with the 1025-clock IFFT.
- **Tone spacing.** The spacing is sample rate / 256: 8.625 kHz at 2.208 MHz.

## What this design chose for itself

The chain, the sizes (256-point IFFT, 256- and 128-QAM, 32-sample prefix,
6-bit QAM levels) and the conjugate-symmetry rule are those of the DMT
modulator this RTL implements. These parts are this design's own choices:

- The bit-to-point tables of both mappers. The 256-QAM Gray mapping
  reproduces the one reference point available (-15 + 9j). The 128-QAM order
  is an arbitrary but simple table.
- The 127 data tones in real transmission, with DC and Nyquist zero. This
  follows the k = 1 .. N-1 sum of the real-output formula. A "128
  sub-channel" count would also include the DC tone.
- The 32-sample prefix. A description of the prefix as a copy of "the last N
  samples" would conflict with this; 32 is the number given for both
  systems.
- The sequential radix-2 IFFT architecture, the 16-bit word, the 2^9 input
  scaling and the per-stage halving.
- Every strobe and handshake (`bit_en`, `sym_valid`, `frame_valid`, `busy`,
  `done`, `overrun`, `out_first`, `out_last`), and the burst output.
- Synchronous reset.

Not included: the quadrature up-converter and band-pass filter that follow
the complex chain, the DAC, and the data source. The top's ports are where
they connect.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `serial_to_parallel_tb` | 7- and 8-bit instances against a reference delay line with random gaps; strobe timing |
| `qam256_mapper_tb` | all 256 patterns against a Gray-level search; 256 distinct points; the -15 + 9j example; latency |
| `qam128_mapper_tb` | all 128 patterns: on the cross, distinct, in order; latency |
| `frame_assembler_tb` | frame contents, `frame_valid` timing, overrun when the sink is busy |
| `conjugate_mirror_tb` | bin placement and conjugation, zero DC and Nyquist bins |
| `ifft_radix2_tb` | random complex and Hermitian frames against a floating-point inverse DFT; 1025-clock latency |
| `parallel_to_serial_tb` | sample order, `out_last`, real-only variant |
| `cyclic_prefix_tb` | prefix and frame order, `out_first`/`out_last`, start one clock after the last input |
| `dmt_transmitter_tb` | both chains, two frames each: every output sample against a floating-point model, 1285-clock latency |
| `dmt_top_tb` | the whole design at full size, including the conjugate mirror: output samples, prefix equals tail, latency, and a forced overrun; each mechanism must occur |

The reference models in the testbenches are written independently of the RTL.
The real chain is checked against the cos/sin form of the real-output
formula, not against a second FFT.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/dmt_pkg.sv \
    tb/dmt_top_tb.sv --top-module dmt_top_tb -Mdir obj_dmt_top
./obj_dmt_top/Vdmt_top_tb
```

Replace `dmt_top_tb` with any other testbench name. The full-size end-to-end
run takes well under a second.

`rtl/` contains only synthesizable SystemVerilog. The twiddle and 128-QAM
tables are built at elaboration, and there are no data files. Lint
(`verilator --lint-only -Wall`) reports only unused package constants and
unused signals: the imaginary inputs of the real chain's P/S and prefix
blocks, the P/S `out_last` that the chain does not need, and the unused upper
bits of the package's 64-bit twiddle arithmetic.
