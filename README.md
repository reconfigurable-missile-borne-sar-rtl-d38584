# Reconfigurable SAR imaging datapath

A synthetic aperture radar (SAR) image is formed from raw radar echoes by a
chain of large Fourier transforms, phase-factor multiplications and one matrix
transpose. In the range-Doppler algorithm with motion compensation the chain is:

1. **Range compression**: 8K-point FFT of every echo line, multiply by the
   pulse-compression and linear-phase functions, 8K-point IFFT.
2. **Parameter estimation** (Doppler rate and Doppler centroid) on the compressed
   data, in parallel with step 1.
3. **Second range compensation**: 4K-point FFT, multiply by a range matching
   function that uses the Doppler rate, 4K-point IFFT.
4. **Azimuth processing**: after a corner turn (transpose), 2K-point FFT along
   azimuth, multiply by the azimuth matching function, 2K-point IFFT.

A raw frame is 8192 x 2048 complex samples. The image is 4096 x 2048, and each
sample is two 32-bit floating-point words.

This design does not build one block per step. It has a small set of
reconfigurable units and reuses them for every step. Three streaming FFT/IFFT
lanes sit between two crossbar switches. Two memory units with external SDRAMs
hold the intermediate matrices, and a CPU rewrites the configuration registers
between steps. Samples stream through the hardware at one per clock and never
pass through the CPU.

```
             +--------------------- sar_soc ----------------------+
 serial in --|   in-switch   lane0: mul+ACU -> FFT/IFFT -> mul+ACU   |
             |  (stream_mux) lane1: mul+ACU -> FFT/IFFT -> mul+ACU   |-- serial out
             |               lane2: mul+ACU -> FFT/IFFT -> mul+ACU   |
             |   out-switch  (stream_mux)                            |
             |   mmu 0 <-> SDRAM 0      mmu 1 <-> SDRAM 1            |
  CPU (AHB) -|   cfg_regs                                            |
             +-------------------------------------------------------+
```

## The phase-factor unit (ACU)

Every matching function in the algorithm can be written as

    exp( j * Para0 * (Vec0 - Vec1 / Para1) )

Para0 and Para1 are scalars that the CPU works out from the radar geometry.
Vec0 and Vec1 are vectors over the frequency or time grid. The ACU (`acu.sv`)
evaluates this expression once per clock with a floating-point divider,
subtractor and multiplier, followed by a pipelined CORDIC (`cordic.sv`). Three
`cfg` bits switch its units in or out:

| bit | 1 means |
|-----|---------|
| 0 | divide Vec1 by Para1 |
| 1 | subtract the Vec1 term |
| 2 | multiply by Para0 |

`cfg = 3'b111` gives the full formula. The phase is turned into a fraction of a
turn, by a multiply with 1/(2*pi), and wrapped to a 32-bit phase word. This
keeps large phases exact modulo 2*pi to the precision of the float.

The vectors come from `vec_gen.sv`. It takes the sample's index n and forms
f = f0 + n*df in floating point. Vec0 and Vec1 can each be f or f^2, which
covers the linear (range walk, Doppler centroid) and quadratic (chirp, Doppler
rate) terms. With `sgn` set, the upper half of the indices counts as negative
frequencies.

`phase_mul.sv` is one ACU, its vector generator and a complex multiplier
(`cplx_mul.sv`). The sample rides through the generator and the ACU as payload
and meets its own factor at the multiplier.

## The FFT/IFFT core

`fft_core.sv` is a single-path delay-feedback (SDF) pipeline. It takes one
complex sample per clock and delivers one per clock. Four settings change at
run time:

* the length N = 2^log2n, up to 8192;
* the direction (`inv`);
* the input/output order (`dit`);
* the precision (`pre`).

**Butterfly stages** (`fft_bf.sv`). A stage with delay D works in periods of 2D
samples:

* During the first D samples it parks the inputs in a D-word feedback memory
  and sends out what the memory returns.
* During the next D samples it combines each input b with the parked a. It sends
  a+b on and parks a-b, which leaves during the following D cycles.

Frames must therefore arrive on consecutive clocks. Gaps are allowed only
between frames. Because of this rule the parked differences always leave in the
D cycles right after a period, so a down-counter marks them valid and the memory
needs no valid bits.

**Mixed radix.** Stages come in radix-2^2 pairs (delays L/2 and L/4). Between
the two stages of a pair the only twiddle is a -j rotation (+j for the IFFT),
which is a swap of the real and imaginary parts and a sign flip. A full twiddle
multiplier follows each pair. The factor for a sample in quarter g of a block,
at position n, is W_L^(n * bitrev2(g)). If log2 N is odd, a plain radix-2 stage
with an N/2-deep memory and its own twiddle multiplier comes first. For shorter
transforms the leading stages are bypassed, so 8K, 4K and 2K all use the same
hardware. The 2K transform uses the radix-2 stage with 1024 words and the last
five pairs.

**Twiddles** (`fft_twiddle.sv`) are not stored. Each twiddle unit counts its
samples, works out the exponent, and gets cos/sin from its own CORDIC. The data
ride through the CORDIC as payload.

**Orders.** In DIF mode (`dit = 0`) input is in natural order and output is in
bit-reversed order. `out_idx` gives each output sample's frequency bin. In DIT
mode (`dit = 1`) input is in bit-reversed order and output is in natural order.
This lets an IFFT lane take an FFT lane's output directly, after a
frequency-domain multiply, with no buffer in between.

DIT mode is built from two `bitrev_buf.sv` reorder buffers around the same DIF
pipeline:

* Each buffer is one N-word memory. Every step reads a word and overwrites it
  with the incoming sample.
* The address order alternates between natural and bit-reversed from frame to
  frame. Bit reversal is its own inverse, so the output is always the input
  frame in bit-reversed order.
* After the last frame of a burst the buffer keeps stepping for N cycles on its
  own to drain.
* Cost: 2*(N+1) extra cycles of latency in DIT mode.

**Inverse and precision.** The IFFT conjugates all twiddles and scales by 1/N
by subtracting from the exponent, so IFFT(FFT(x)) = x. `pre` keeps that many of
the 23 mantissa bits after every butterfly. 23 is full precision.

**Throughput.** One 8K frame every 8192 clocks, which is 81.9 us at 100 MHz.
The reference chip takes 82.7 us per 8K transform.

## Lanes and switches

A lane (`proc_lane.sv`) is `phase_mul` -> `fft_core` -> `phase_mul`:

* The first multiplier indexes samples by their position in the frame, or by
  the bit-reversed position in DIT mode.
* The second multiplier indexes them by the frequency bin the core reports.
  Frequency-domain factors are therefore right whatever the output order.

Either multiplier can be bypassed. `stream_mux.sv` is a registered crossbar. At
the top level the input switch feeds each lane from the serial input, either
MMU, or any lane's output (chaining). The output switch feeds each MMU and the
serial output.

## Memory units and the corner turn

`mmu.sv` writes a matrix of `na` lines by `nr_in` points, line by line. It keeps
only the first `nr_keep` points of each line, which performs the truncation from
8K to 4K range points. It reads the matrix back in one of two modes:

* `sel = 0`: sequential, the same order.
* `sel = 1`: transposed, column by column. This is the corner turn.

Both directions must run at full rate, so the matrix is stored in 32 x 32 tiles
with one SDRAM page per tile:

    bank = (ta + tr) mod NBANK
    row  = ta * ceil(NR_MAX/TILE/NBANK) + tr / NBANK
    col  = (a mod TILE) * TILE + (r mod TILE)

Here (ta, tr) is the tile of element (a, r). A run along a line and a run down a
column both stay in an open page for 32 samples. The next tile in either
direction is in another bank, so its page can be opened while the current one
streams.

The SDRAM side is a simple command stream: valid/ready, write enable,
bank/row/column, write data, and read data returned in order. A real SDRAM
controller (activate, precharge, refresh, timing) would sit behind it; it is not
part of this RTL. Two MMUs with two SDRAMs work in ping-pong: one is written
while the other is read.

## Configuration (AHB)

`cfg_regs.sv` is an AHB-Lite slave with 64 read/write words and read-only status
words behind them. There are no wait states and only 32-bit transfers. A write
also gives a one-cycle strobe, which starts MMU passes and clears lanes. The
full register map is in the header of `sar_soc.sv`. In short:

| word | contents |
|------|----------|
| 16*c + 0 .. 11 | lane c: length, direction, order, precision, both multipliers (control, Para0, Para1, f0, df), clear |
| 48 | input switch selects |
| 49 | output switch selects |
| 50 + 4*m .. | MMU m: mode, line count, line lengths, start command |
| 64 (read-only) | MMU busy and lost-sample flags |

Pulse a lane's clear after changing its length, direction or order. Change a
multiplier's settings only while no stream passes.

## Number format

Samples are complex, with two 32-bit floats. The layout is IEEE-754 binary32
with a reduced rule set:

* subnormals are flushed to zero;
* results are truncated (rounded toward zero);
* overflow saturates to the largest finite value;
* no NaN or infinity is ever produced.

All arithmetic is in `sar_pkg.sv`: add, multiply, divide, fixed-to-float,
float-to-phase, mantissa cut and power-of-two scaling.

## What is outside, and where this RTL departs from the reference design

* **Not in the RTL:**
  * The CPU: its AHB port is a top-level port.
  * The serial links (SERDES): their parallel sides are top-level ports.
  * The SDRAMs: their command streams are top-level ports. `tb/sdram_model.sv`
    models them for simulation.
  * The Doppler rate and Doppler centroid estimators: treated as CPU software
    that supplies Para0 and Para1.
  * Pads and analog parts.
* **DIT mode** uses reorder buffers around a DIF pipeline. The reference chip's
  DIT structure is not known, so latency in that mode may differ.
* **Twiddles from CORDICs** instead of tables. The CORDIC width and iteration
  count (24) are chosen here.
* **Own choices:** the floating-point rounding rules, the ACU switch encoding,
  the vector rule (f or f^2 of a linear grid), the tile size (32), the bank
  count (8), the register map, the switch encoding and the handshakes.
* **No stream back-pressure.** An MMU that sees its SDRAM not ready while a
  sample arrives drops the sample and sets `wr_lost`.
* **Timing closure** at 100 MHz has not been studied. The floating-point
  operators are single-cycle combinational functions and would need deeper
  pipelining for a real implementation.

## Sizes against the reference workload

| item | needed | built |
|------|--------|-------|
| longest transform | 8192 points | `LOG2_NMAX = 13` |
| matrix per SDRAM | 2048 x 8192 x 64 bit = 1 Gbit | 8 banks x 2048 rows x 1024 columns |
| range line rate | one 8K line per 145 us | one per 81.9 us at 100 MHz |
| frame time at 100 MHz | 471.5 ms in the reference | about 465 ms by streaming arithmetic (input-bound step 1, then 2048 x 4096 + 4096 x 2048 clocks); not simulated at full frame size |

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. They use `tb/tb_util_pkg.sv` (float/real
conversion) and, for memories, `tb/sdram_model.sv`. For example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_fft_core \
      -y rtl -y tb +libext+.sv -Irtl -Itb rtl/sar_pkg.sv tb/tb_util_pkg.sv tb/tb_fft_core.sv
    ./obj_dir/Vtb_fft_core

The testbenches:

* `tb_fft_core`: compares lengths 8 to 64, forward and inverse, DIF and DIT,
  with a double-precision DFT. It checks the bin order and that back-to-back
  frames leave N clocks apart.
* `tb_sar_soc`: runs a scaled-down version of the whole flow over the AHB port:
  FFT with a matching function, chained IFFT in DIT order, range truncation into
  MMU 0, transposed read into an azimuth FFT with a phase factor, MMU 1, and
  serial output. It checks every output sample against a reference model and
  counts each mechanism.
* `tb_sar_soc_full`: the top at its default size. It runs one 8192-point range
  line through FFT, matching multiply and IFFT, and checks all 8192 results and
  that they leave on consecutive clocks. It takes under a minute.
