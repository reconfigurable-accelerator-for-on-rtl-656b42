# BackProjection matched-filter accelerator for on-board SAR imaging

BackProjection forms a synthetic-aperture-radar image pixel by pixel. For
every pixel it goes through all radar pulses, takes the echo at the pixel's
range, turns it by the phase the round trip should have produced, and adds it
up:

    f(x, y) = sum over pulses p of  s[p] * exp(i * 2 * ku * R[p])

Here `R[p]` is the distance from the platform at pulse `p` to the pixel, `ku =
2*pi*fc/c` is the carrier wave number, and `s[p]` is the echo sample
interpolated at that range. On an embedded ARM core the sine and cosine of
`2*ku*R` dominate the run time, taking most of the per-pulse cost. This RTL
moves that part into programmable logic. The host still computes the ranges and
interpolates the samples. It streams both to the accelerator and gets back one
complex pixel value per pixel.

The design follows the HW/SW split of the Zynq-7020 accelerator published as
*Reconfigurable Accelerator for On-Board SAR Imaging Using the BackProjection
Algorithm*. There, the accelerator was an HLS core called
`axis_sar1_datapath`, fed by an AXI DMA. Its structure is kept here: two
loops per pixel, a CORDIC sine/cosine unit of 24 cycles, two local sin/cos
memories of 512 words, and floating-point arithmetic with binary64 ranges and
binary32 samples. The arithmetic units, number formats, pipelining and stream
framing are this implementation's own. They are listed under
"Departures and own choices" below.

## Per-pixel protocol on the streams

The top module `axis_sar1_datapath` has one 64-bit AXI4-Stream input,
`strm_in`, and one 64-bit AXI4-Stream output, `strm_out`. Both use the usual
tvalid/tready handshake. The ranges and the samples share the one input
stream, one after the other. For each pixel the host sends `2*N_PULSES` beats on
`strm_in`, in this order:

| beats | content of `strm_in_tdata` |
|---|---|
| 0 .. N_PULSES-1 | range `R[p]` in metres, IEEE binary64 |
| N_PULSES .. 2*N_PULSES-1 | sample `s[p]`: real part binary32 in `[31:0]`, imaginary part binary32 in `[63:32]` |

The accelerator then sends one beat on `strm_out`: the pixel value, packed like
a sample. `strm_out_tlast` is high on every `NPIX_X`-th pixel, so a DMA receive
of one image row (512 pixels by default) ends on TLAST. The input stream's
TLAST is not used. Framing is purely by counting, so the host must always send
exactly `N_PULSES` ranges followed by `N_PULSES` samples.

`strm_in_tready` is high only while the accelerator is taking ranges or
samples. It is low while the accelerator waits for its sin/cos pipeline to
drain, waits for the final sum, and offers the pixel. A producer may hold
`tvalid` high through those gaps.

## Inside one pixel

```
strm_in ─┬─> sar_angle ──> sar_sincos ──> sar_trig_mem ──┐
 (ranges)│   2·ku·R, to     24-stage       mem_sin[p]     │
         │   turns (3 cy)   CORDIC         mem_cos[p]     v
         └─────────── (samples, 1-cycle align) ────> sar_mf_acc ──> strm_out
                                                    (cos+i·sin)·s, Σ
```

The controller in `axis_sar1_datapath` steps through five states
(`sar_state_t` in `sar_pkg`):

1. **RANGE**: it accepts `N_PULSES` ranges, one per cycle. Each goes into the
   angle unit tagged with its pulse index.
2. **DRAIN**: it waits until the last of the `N_PULSES` sin/cos pairs has been
   written to the memories. That takes 28 cycles after the last range.
3. **SAMPLE**: it accepts `N_PULSES` samples, one per cycle. Each sample reads
   its pulse's sin/cos from the memories (one cycle) and goes into the matched
   filter with it.
4. **WAIT**: it waits for the accumulator's sum, which comes 5 cycles after the
   last sample.
5. **OUT**: it holds the pixel on `strm_out` until it is taken, then returns to
   RANGE.

If neither stream stalls, one pixel takes **2*N_PULSES + 33 cycles**: 1057
cycles, or 10.6 µs at 100 MHz, for 512 pulses. A whole 512 x 512 image from
512 pulses then needs about 2.8 s of accelerator time. In the published
system the host's range computation and the DMA transfers dominate instead.

### From range to phase (`sar_angle`)

This is where precision matters most. A range of 10 km at a 10 GHz carrier
gives an angle `2*ku*R` of about 4 million radians, and only its remainder
modulo 2π matters. That is why the range arrives as binary64. The unit
computes `angle = R * 2ku` and then `turns = angle * 1/(2π)`, both as
correctly rounded binary64 products (`fp_mul` with 11/52-bit fields). It then
takes the fractional part of `turns` from the binary64 fields by shifting the
significand. The result is a 32-bit unsigned phase in units of 2^-32 turn,
rounded towards minus infinity, so negative angles wrap correctly. binary64
keeps about 2^-30 turn of resolution at these magnitudes. The unit has three
register stages and no stall.

### Sine and cosine (`sar_sincos`)

The unit is a CORDIC in rotation mode with 24 iterations, one per pipeline
stage, so it has 24 cycles of latency and takes one phase per cycle. Phases in
the second and third quarter turn are moved by half a turn and the results are
negated. This keeps every rotation within the CORDIC's convergence range of
about ±99°. `x` and `y` are signed 32-bit values with 30 fractional bits, and
`x` starts at the CORDIC gain 0.6072529, so no scaling is needed afterwards.
The residual angle is kept in turns. The rotation table is
`ATAN[i] = round(atan(2^-i) / (2π) * 2^32)` for `i = 0..23`. The final `x`
(cosine) and `y` (sine) are converted to binary32 (`fix_to_f32`, round to
nearest even). The measured worst absolute error is 1.3e-7.

### Sin/cos memories (`sar_trig_mem`)

There are two arrays of `N_PULSES` binary32 words, `mem_sin` and `mem_cos`.
They share one write port and one registered read port, so each maps onto one
18-kbit block RAM at 512 x 32. A read takes one cycle. If the same address is
read and written in one cycle, the read returns the old word.

### Matched filter and accumulator (`sar_mf_acc`)

All of this arithmetic is binary32:

    re = cos*s.re - sin*s.im     im = cos*s.im + sin*s.re     acc += (re, im)

Stage 1 registers the four products and stage 2 the two sums. The
accumulator register then adds the new term combinationally, so a term can
enter every cycle with no loop-carried pipeline hazard. The adder is on the
critical path; at high clock rates it is the first thing to pipeline. The
pixel's last term is marked with `in_last`. Three cycles later `out_valid`
pulses with the sum, and the accumulator restarts from zero, so pixels may
follow each other back to back.

### Floating-point conventions (`fp_mul`, `fp_add`, `fix_to_f32`)

These are generic combinational IEEE-754 units, parameterised by exponent and
fraction width:

- They round to nearest, ties to even.
- Subnormal inputs are read as zero, and results that would be subnormal are
  flushed to zero.
- Overflow gives ±infinity.
- A NaN input, 0·∞ or ∞−∞ gives a quiet NaN.
- An exact zero sum is +0.

Other than the flush to zero of subnormals, the results are bit-exact IEEE
results.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `axis_sar1_datapath` | `N_PULSES` | 512 | pulses per pixel (also memory depth) |
| | `NPIX_X` | 512 | pixels per image row (TLAST period) |
| | `TWO_KU` | `64'h407a32b43df29600` | 2·ku as binary64; 419.169 rad/m, for a 10 GHz carrier |
| `sar_sincos` | `ITER` | 24 | CORDIC stages (1..24) |
| `sar_angle` | `PW` | 32 | phase width |

Shared types and constants are in `rtl/sar_pkg.sv`. For another carrier,
set `TWO_KU` to the binary64 bits of `4*pi*fc/c`.

## Departures and own choices

These follow the published accelerator:

- the two-loop structure;
- the binary64 ranges and binary32 complex samples;
- the 512-pulse sin/cos memories;
- the 24-cycle CORDIC;
- one pixel value per 512 pulses;
- the 512-pixel row as the unit of output transfer.

These are choices made here:

- **Angle formula.** The angle is `2*ku*R`, as in the reference software. The
  range reduction through 1/(2π) and the 32-bit phase are this design's own.
- **Output per pixel.** One output beat per pixel, after the last pulse. There
  is no running partial sum per pulse.
- **Output TLAST.** TLAST is raised at the end of each `NPIX_X`-pixel row.
- **One input stream.** Ranges and samples share `strm_in`, as in the
  published core's port list; its block diagram draws them as two inputs.
- **Input framing.** The input stream is framed by counting; its TLAST is
  ignored.
- **Beat packing.** The real part is in the low half of each complex beat.
- **Controller.** The DRAIN and WAIT states are this design's own. A pixel's
  output does not overlap the next pixel's ranges.
- **Latency.** The published core reports a minimum latency of 60 cycles. This
  one has 28 cycles from the last range to the first sample, and 5 from the
  last sample to the output.
- **Carrier.** `TWO_KU` assumes a 10 GHz carrier. It is a parameter because
  the published core has no control port.
- **Reset.** Reset is synchronous and active low (`ap_rst_n`). The memories
  and data registers are not reset.
- **Subnormals.** Subnormal numbers are flushed to zero.

The surrounding system is not included: the ARM processing system, the AXI
DMA, and the AXI interconnects. Each stream port connects directly to a DMA's
MM2S or S2MM stream.

## Accuracy

Against a binary64 reference of `sum s[p]*exp(i*2ku*R[p])`, a full row of
512 pixels × 512 pulses stays within 1.1e-7 of `sum |s[p]|`. This is for a
flight geometry at about 9.4 km range. The error comes from three sources:

- the CORDIC's sine and cosine (about 1e-7);
- binary32 rounding in the products and the accumulation;
- the phase quantisation (2^-32 turn, negligible).

## Simulation

Each testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it covers |
|---|---|
| `tb_fp_units` | `fp_mul` (binary32 and binary64), `fp_add`, `fix_to_f32`: random operands against correctly rounded reals, with directed ties, cancellation, overflow, underflow and NaN cases |
| `tb_sar_angle` | phase against a real-number model, bit-exact; 3-cycle latency; negative ranges |
| `tb_sar_sincos` | sin/cos within 4e-7; 24-cycle latency; quarter-turn corners |
| `tb_sar_trig_mem` | all addresses; 1-cycle read; hold; read during write |
| `tb_sar_mf_acc` | bit-exact against a sequence of binary32 operations (±1 ulp); 3-cycle latency; back-to-back pixels |
| `tb_axis_sar1_datapath` | 16 pulses, 3-pixel rows, 12 pixels; random input gaps and output back-pressure; counts input gaps, refused beats, drain waits, back-pressure and row ends; checks the 2N+33 period on clean pixels |
| `tb_sar_point_target` | 512 pulses, 16 x 16 image of one point reflector: the testbench synthesises range-compressed echoes, interpolates samples as a host would, and checks every pixel and that the image focuses on the target (peak about 24 times the strongest pixel two cells away) |
| `tb_axis_sar1_full` | default parameters: one full 512-pixel row (541,184 cycles), every pixel checked, TLAST and total cycle count |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sar_pkg.sv tb/sar_tb_pkg.sv tb/tb_axis_sar1_full.sv \
    --top-module tb_axis_sar1_full -y rtl -y tb +libext+.sv -o sim
./obj_dir/sim
```

The full-row test runs in about a second. `tb/sar_tb_pkg.sv` holds the
reference arithmetic. It converts between `real` and binary32 bit patterns
without relying on `shortreal`, and it provides the synthetic flight geometry.

The top module carries two assertions:

- the output stream holds its data while stalled;
- no sin/cos write happens once the sample phase has begun.
