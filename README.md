# Two-parallel MDC FFT and IFFT, 16 points, with scaling-free CORDIC twiddles

This RTL computes 16-point FFTs and IFFTs as streaming pipelines that take two
complex samples per clock. The pipelines are multipath delay commutator (MDC)
designs. Four butterfly stages are chained, and between stages a delay line
plus a two-way switch reorders the two data streams, so each butterfly gets the
two samples it must combine in the same clock. The design spends little area
on multiplication:

* **No twiddle ROM.** A *modified scaling-free CORDIC* computes the twiddle
  factors W16^n after reset. Its micro-rotations are chosen by a
  most-significant-1 detector and built from short Taylor series, so it needs
  neither a scale-factor correction nor an arctangent table.
* **No hardware multipliers.** A complex multiplier scans the twiddle bits and
  adds shifted copies of the sample.
* **No multiplier for the trivial twiddles.** The factor -j of the 4-point
  stage is a swap of real and imaginary parts with one sign change. A
  multiplexer (SW2) does it.

The structure follows the published architecture "Modified Scaling-Free
CORDIC Based Pipelined Parallel MDC FFT and IFFT Architecture for Radix 2^2
Algorithm" (Paramasivam and Jayanthi). That source leaves out some details:
word widths, control, flow control and the placement of the twiddles. This
design fills them in. Each such choice is listed in
[Where this design departs from, or adds to, the architecture](#where-this-design-departs-from-or-adds-to-the-architecture).

## The forward pipeline

```
 x(n)   ->|      |-------------> [LM] ->|     |--> [4D] -->|      |------> [LM] ->|     |--> [2D] -->|
          | BF I |                      | SW1 |            | BF II|               | SW1 |            |
 x(n+8) ->|      |--> (x W16^n) -> [4D]>|     |----------->|      |-(x W16^2m)-[2D]>|     |----------->|
                          ^                                   | counter: twiddle addresses |
                          +---------------- CORDIC twiddle table <-------------------------+

   ->|      |->|     |--------------->|     |--> [1D] -->|      |--> X(k)
     | BF I |  | SW2 |                | SW1 |            | BF I |
   ->|      |->| -j? |----> [1D] ---->|     |----------->|      |--> X(k+8)
```

`[nD]` is a shift register of n stages. `[LM]` is a delay equal to the
multiplier latency (16 clocks). It keeps the branch without a multiplier
aligned with the branch that has one.

| stage | butterfly pairs rows | after the butterfly | unit |
|---|---|---|---|
| 1 | n, n+8 | lower row 8+n times W16^n | BF I, multiplier 1 |
| 2 | n, n+4 inside each half | lower row times W16^(2m), m = row mod 4 | BF II, multiplier 2 |
| 3 | n, n+2 inside each quarter | rows 3, 7, 11, 15 times -j | BF I, SW2 |
| 4 | n, n+1 | none: X(bitrev(row)) | BF I |

Rows are the 16 node positions of a decimation-in-frequency flow graph.

### How the commutators reorder the data

This is the hardest part of the design to follow, and it depends only on
counting. Each accepted clock brings one pair. Call the pair index within a
frame p = 0..7. Between two stages, a commutator of delay D works on the
upper stream U(p) and the lower stream L(p) of the stage before it:

* The lower stream goes through D registers, then reaches switch SW1.
* SW1 passes its inputs straight for D clocks. For the next D clocks it
  interchanges them (`ctrl = 1`).
* The upper output of SW1 goes through D more registers.

Counted from when the first value reaches the commutator, the next stage then
receives these pairs:

| time s | upper input | lower input |
|---|---|---|
| D .. 2D-1 | U(s-D) | U(s) |
| 2D .. 3D-1 | L(s-2D) | L(s-D) |

So the next butterfly combines samples that were D pairs apart on the same
stream. Examples:

* With D = 4 after stage 1, stage 2 gets (a0, a4) ... (a3, a7), then
  (b0, b4) ... (b3, b7). Here a = x(n) + x(n+8) and b = (x(n) - x(n+8))·W16^n.
* With D = 2 after stage 2, stage 3 gets rows (0,2), (1,3), (4,6), (5,7), ...
* With D = 1 after stage 3, stage 4 gets rows (0,1), (2,3), ...

Stage 4 output p holds rows 2p and 2p+1, which are X(bitrev3(p)) and
X(bitrev3(p) + 8). So the outputs come out in the order
k = 0, 4, 2, 6, 1, 5, 3, 7, and `out_k` gives k for each pair.

Every switch setting and twiddle address comes from one count: the number of
accepted pairs since reset, modulo 8. Each control is one bit of that count
minus the fixed latency to that unit. The latencies are set as parameters in
`r22_mdc_fft16.sv`.

## Twiddle factors: modified scaling-free CORDIC (`msf_cordic_twiddle`)

The angle is a 16-bit unsigned fraction of a radian: bit i weighs 2^(i-16).
Each clock does one step:

1. Find M, the position of the most significant 1 of the remaining angle.
2. If M = 15 (0.5 rad or more), rotate by 0.25 rad (shift s = 2) and subtract
   0.25 from the angle. A Taylor series would be too inaccurate at 0.5 rad.
3. Otherwise rotate by 2^-s rad with s = 16 - M, and clear bit M.
4. Stop when the angle is zero.

A rotation by 2^-s is done with shifts and adds only:

```
cos(2^-s) ~ 1 - 2^-(2s+1) + 2^-(4s+5)
sin(2^-s) ~ 2^-s - 2^-(3s+3) - 2^-(3s+5) - 2^-(3s+7)
x' = x cos - y sin,   y' = y cos + x sin
```

Each rotation keeps the vector length to within about 3e-5, so the vector
starts at (1, 0). It does not start at the 0.6073 scale-factor constant of
the classic CORDIC.

Angles are folded into [0, pi/4]. Above pi/4 the generator swaps cos and sin.
Above pi/2 it uses cos(pi/2 + a) = -sin a. The generator fills an 8-entry
table, W16^0 .. W16^7, one entry at a time, using at most six micro-rotations
per entry. Then it raises `ready`, 57 clocks after reset. The table has two
combinational read ports, one for each multiplier. With `INVERSE = 1` it
holds the conjugates, for the IFFT.

Precision: the internal vector is 24 bits with 21 fraction bits. The output is
Q1.14 in 16 bits, so 1.0 = 16384. The worst error against exact cos/sin is
2.2 LSB.

## Shift-add complex multiplier (`msf_cordic_cmult`)

The multiplier computes (A + Bj)(C + Dj) = (AC - BD) + j(AD + BC):

1. Split each twiddle part into a sign and a 15-bit magnitude.
2. For each magnitude bit i: if the bit is 1, add the sample shifted left by
   i into the accumulators. Four accumulators build |C|A, |D|B, |D|A and |C|B.
3. In the last stage, apply the signs, form AC - BD and AD + BC, and round to
   nearest by 14 bits.

The architecture handles one twiddle bit per clock. Here that loop is unrolled
into 15 pipeline stages plus an output stage, so the pipeline still accepts a
new sample every clock. Latency is TW = 16 clocks. The result is exactly the
rounded product.

## The inverse pipeline (`r22_mdc_ifft16`)

The IFFT undoes the FFT's stages in reverse order. Each stage becomes a
decimation-in-time stage, with its rotation applied before the butterfly:

```
BF I -> [1D|SW1|1D] -> SW2 (+j) -> BF I -> [2D|SW1|2D] -> x W16^-2m -> BF II
     -> [4D|SW1|4D] -> x W16^-n -> BF I
```

It accepts the pairs in the FFT's output order (k = 0, 4, 2, 6, 1, 5, 3, 7),
so FFT output can go straight into it. It returns 16·x(n) and 16·x(n+8) in
natural order n = 0..7, reported on `out_n`. There is no 1/16 scaling.

## Interface and timing

`r22_mdc_fft16` and `r22_mdc_ifft16` have the same ports.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `in_valid` | in | 1 | a pair is presented |
| `in_ready` | out | 1 | twiddle table built; goes high 57 clocks after reset |
| `in0_*`, `in1_*` | in | DW = 16 | FFT: x(n), x(n+8). IFFT: X(k), X(k+8) |
| `out_valid` | out | 1 | an output pair is present |
| `out_k` / `out_n` | out | 3 | index of the output pair |
| `out0_*`, `out1_*` | out | DW+5 = 21 | FFT: X(k), X(k+8). IFFT: 16·x(n), 16·x(n+8) |

* **Flow control.** The whole pipeline advances only on clocks where
  `in_valid && in_ready`. Input may pause at any clock, and the frame
  structure is kept.
* **Frame alignment.** After reset, the first accepted pair is position 0 of
  a frame. Frames follow one another in the count of accepted pairs.
* **Latency.** A pair's results appear 2·TW + 11 = 43 accepted pairs later,
  with `out_valid` high. To flush the last frame, push 43 more pairs, for
  example zeros.
* **Throughput.** Two samples per clock: one 16-point transform every 8
  clocks.
* **Word widths.** The data path is DW+5 bits from the first stage onwards.
  The four butterflies can double the range four times, and one guard bit
  covers rotations. Nothing is scaled or saturated, and a full-scale input
  cannot overflow.

`mdc_fft_ifft_top` places the two pipelines side by side, with `fft_` and
`ifft_` prefixes on their ports. They share only clock and reset.

## Where this design departs from, or adds to, the architecture

* **Twiddle placement.** The architecture is called radix-2^2, and its flow
  graph puts the W16 factors after the second stage on both halves of the
  data. Its block diagram, however, has one multiplier on the lower branch
  after each of the first two stages. A single lower-branch multiplier cannot
  apply the radix-2^2 stage-2 factors: they need nine non-trivial values on
  eight lower-branch slots per frame. This design keeps the block diagram. So
  the multipliers apply the radix-2 DIF factors: W16^n after stage 1, and
  W16^2m after stage 2. The -j factors after stage 3 are the same as in the
  radix-2^2 graph, and SW2 handles them as described. The result is the exact
  DFT either way.
* **Butterfly unit II.** The source's text disagrees with itself about which
  stages use butterfly unit II. This design follows the block diagrams: one
  BF II per pipeline, between the two multipliers. Its counter supplies the
  twiddle address of both multipliers, through its two outputs
  (`tw_addr1`, `tw_addr2`).
* **Multiplier form.** The bit-serial multiply is unrolled into a pipeline,
  and the other branch gets a matching 16-clock delay. The accumulators are
  37 bits wide: 21-bit data times a 16-bit twiddle. The architecture mentions
  32-bit registers for narrower operands.
* **Twiddle generator.** The Taylor series terms, the octant folding, the
  start vector, the internal precision and the build-once table are all this
  design's choices. The architecture gives the micro-rotation selection rule
  and says only that a Taylor series removes the scaling.
* **IFFT.** The architecture says only that the IFFT is the opposite of the
  FFT. This design's choices are: SW2 rotates by +j, the twiddles are
  conjugated, and the output is not divided by 16.
* **Not built.** Other transform sizes (the structure is fixed at 16 points),
  and the area, power and clock-rate results the source reports for its
  90-nm ASIC and Virtex-5 implementations. This RTL does not reproduce
  those results.

## Files

All files are in `rtl/` and `tb/`.

* **`rtl/mdc_fft_pkg.sv`**: constants (16 points, twiddle address width, word
  growth) and small helper functions.
* **Building blocks**:
  * `rtl/bf1.sv`: butterfly unit I.
  * `rtl/bf2.sv`: butterfly unit II, a butterfly plus the twiddle-address
    counter.
  * `rtl/sw1.sv`: the commutator switch.
  * `rtl/sw2.sv`: the -j / +j rotation multiplexer.
  * `rtl/delay_line.sv`: a shift register with enable.
* **Arithmetic**:
  * `rtl/msf_cordic_twiddle.sv`: the twiddle generator.
  * `rtl/msf_cordic_cmult.sv`: the shift-add complex multiplier.
* **Pipelines**:
  * `rtl/r22_mdc_fft16.sv`: the FFT.
  * `rtl/r22_mdc_ifft16.sv`: the IFFT.
  * `rtl/mdc_fft_ifft_top.sv`: both pipelines side by side.
* **`tb/tb_<module>.sv`**: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
* **`tb/tb_mech_pkg.sv`, `tb/tb_core_mon.sv`, `tb/tb_cordic_mon.sv`**: event
  counters. The end-to-end testbench binds them into the pipelines and the
  CORDIC generators.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/mdc_fft_pkg.sv tb/tb_mdc_fft_ifft_top.sv --top-module tb_mdc_fft_ifft_top
./obj_dir/Vtb_mdc_fft_ifft_top
```

Replace the testbench name to run another one. The end-to-end testbench uses
every default parameter and checks the following:

* It streams 22 random frames through the FFT, with random pauses, and checks
  the first 10 against a double-precision DFT.
* It divides each FFT output by 16 and feeds it straight into the IFFT. The
  IFFT must return the original samples to within 12 LSB plus 4e-5 of the
  frame's summed magnitudes (at most about 32 LSB).
* It checks both latencies and the output index order.
* It counts input pauses, SW1 interchanges, SW2 rotations and both kinds of
  CORDIC micro-rotation. Any of these that never happens counts as a failure.

Measured accuracy:

* FFT on full-scale 16-bit input: at most 25 LSB of error on outputs up to
  about 2.6·10^5, which is about 1e-4 of full scale. The error comes from
  the 14-bit twiddles.
* FFT to IFFT round trip: at most 5 LSB.
