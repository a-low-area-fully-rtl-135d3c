# A reconfigurable mixed-radix SDF FFT for the 32 LTE sizes

LTE needs DFTs of many sizes, all of the form N = 2^X · 3^Y, up to 2048
points. Building one FFT core per size wastes area. This design is a single
streaming core that handles all 32 sizes. It has four identical processing
elements, called *super stages*, connected in series. Each one can be
reconfigured to act as one, two or three radix-2 or radix-3 stages. The
feedback FIFOs of all stages live in one shared FIFO bank, and that bank is
re-partitioned for every size.

The architecture follows a published design: a low-area, fully
reconfigurable single-path delay-feedback (SDF) FFT for 3GPP-LTE. That
design fixes the block structure, the processing-element organisation and the
list of modes. Everything the publication leaves open is filled in here and
marked as this design's own choice in the sections below. That includes the
arithmetic format, the schedules, the FIFO placement rule, the twiddle
generator and the size-to-mode rule.

## Supported sizes

The core accepts exactly these 32 points (X, Y):

| X | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 |
|---|---|---|---|---|---|---|---|---|----|----|
| Y | 0..5 | 0..4 | 0..4 | 0..3 | 0..2 | 0..2 | 0..1 | 0..1 | 0 | 0 |

That gives N = 4, 8, 12, …, 972, 1024, 1152, 1296, 1536 and 2048. Two more
values of 2^X·3^Y also lie below 2048, 1728 = 2^6·3^3 and 1944 = 2^3·3^5, but
they are not in the supported set. The core refuses them, as it refuses
any other point (`cfg_ok` = 0), and keeps the previous size.

## Data path: four super stages and one FIFO bank

```
          +--------------------- FIFO bank (16 chains, 2048 words) ---------------------+
          |   m chains         |   m chains          |   m chains         |   m chains   |
 din -> [RPE stage 0] ---> [RPE stage 1] ---> [RPE stage 2] ---> [RPE stage 3] -> dout
          |  3 twiddles        |                     |                    |              |
          +------------------------------ twiddle unit (12 ports) ------------------------+
```

In the RTL, stage 0 is the one that receives the input. The original
numbering counts the other way, so stage 0 is its "super stage 4" and stage 3
is its "super stage 1". Each stage runs in one of seven modes:

| mode | radix sub-stages, in data order | adders | multipliers | FIFO chains (m) |
|------|--------------------------------|--------|-------------|-----------------|
| 2S-R3 | radix-3, radix-3 | 12 | 4 | 4 |
| R3-R2 | radix-3, radix-2 | 8 | 3 | 3 |
| 3S-R2 | radix-2, radix-2, radix-2 | 6 | 3 | 3 |
| 2S-R2 | radix-2, radix-2 | 4 | 2 | 2 |
| 1S-R3 | radix-3 | 6 | 2 | 2 |
| 1S-R2 | radix-2 | 2 | 1 | 1 |
| pass | one register | 0 | 0 | 0 |

The pass mode is an addition in this design. It is needed because small
sizes leave some stages with nothing to do.

### How a size is spread over the stages (`fft_ctrl`)

The control unit splits N in this order:

1. Each pair of factors 3 becomes a 2S-R3 stage.
2. A single factor 3 that is left over becomes an R3-R2 stage when X is odd.
   The R3-R2 stage takes one factor 2 with it. When X is even, the factor 3
   becomes a 1S-R3 stage.
3. The factors 2 fill 3S-R2 stages, then at most one 2S-R2 or 1S-R2 stage.
4. Any stages left over pass their data through.

Every supported size fits in four stages this way, and all six radix modes
occur among the 32 sizes. Examples: 2048 = 8·8·8·4 (3S-R2, 3S-R2, 3S-R2,
2S-R2), 972 = 9·9·3·4 (2S-R3, 2S-R3, 1S-R3, 2S-R2), 1536 = 6·8·8·4 (R3-R2,
3S-R2, 3S-R2, 2S-R2), 12 = 3·4 (1S-R3, 2S-R2, pass, pass).

Next, the control unit walks the radix sub-stages in data order, starting from
L = N. A radix-r sub-stage gets feedback delay D = L/r and twiddle block
length L, and the next sub-stage starts from L = D. Block lengths are carried
as exponents (la, lb) with L = 2^la · 3^lb, so no divider is needed anywhere.

## The processing element (`rpe`) — the part to read carefully

Each element has twelve complex adders and four complex multipliers, arranged
in eight banks. Each bank's name reflects what it contains:

```
 adder   mixed      adder   mult.   adder   mixed      adder   mult.
 bank 1  bank 1     bank 2  bank 1  bank 3  bank 2     bank 4  bank 2
 CA1-1   CA2-1      CA3-1   CM4     CA5-1   CA6-1      CA7-1   CM8
 CA1-2   CA2-2      CA3-2           CA5-2   CA6-2      CA7-2
         CM2                                CM6
```

The modes reuse these units as follows:

* **Radix-3 in banks 1–3** (2S-R3, R3-R2):
  * CA1: t1 = b + c and t2 = b − c.
  * CA2: X0 = a + t1 and m1 = a − t1/2.
  * CM2: m2 = −j·(√3/2)·t2, a multiplication by a constant.
  * CA3: X1 = m1 + m2 and X2 = m1 − m2.
  * CM4 then applies the twiddle factor.
* **Radix-3 in banks 5–7** (2S-R3, 1S-R3): the same butterfly on CA5, CA6, CM6
  and CA7, followed by CM8.
* **Radix-2**: CA2 (3S-R2 only), CA5 (3S-R2 and 2S-R2) or CA7 (every mode
  with a radix-2 stage). Each is followed by its twiddle multiplier: CM4, CM6
  or CM8. In these modes CM6 works as a twiddle multiplier, not as the radix-3
  constant multiplier.

**Switching banks on and off.** A unit that the current mode does not use
gets zero operands, so its logic does not toggle. The element reports its
active units on `ca_active` (adder pairs CA1, CA2, CA3, CA5, CA6, CA7) and
`cm_active` (CM2, CM4, CM6, CM8). `fft_top` brings these out for all four
stages. Twice the number of active adder pairs and the number of active
multipliers equal the adders and multipliers columns of the mode table above.
Both testbenches check this.

Internally the element has three "slots": A (banks 1–3), B (banks 5–6) and
C (bank 7). `cfg[0..2]` configures them. A radix-3 stage in banks 5–7 uses
slot B's configuration and sequencer. Each slot has its own sequencer
(`sdf_ctrl`). That sequencer restarts on the frame-start tag that travels with
the data, and it produces the phase, the position within the phase and the
twiddle exponent.

**SDF schedules.** A radix-r sub-stage with delay D works on periods of r·D
samples, split into r phases of D cycles.

* **Radix-2**, one chain f of length D:
  * Phase 0: output f (last period's difference) and store the input in f.
  * Phase 1: output (f + x)/2 and store (f − x)/2 in f.
* **Radix-3**, chains f1 and f2 of length D each:
  * Phase 0: output f1 (X1 of the previous period), store x in f1 and
    recirculate f2 (X2).
  * Phase 1: output f2 (X2), store x in f1 and move f1 into f2.
  * Phase 2: a = f2, b = f1, c = x. Output X0/4, store X1/4 in f1 and X2/4
    in f2.

In phase p the sub-stage outputs butterfly result q = (p+1) mod r of
butterfly n (n counts 0 … D−1 within the phase). The following multiplier
therefore applies W_L^(q·n), with L = r·D.

**Chain ports.** The element uses its m chain ports in sub-stage order: slot A
first, then B, then C. `chain_len` tells the FIFO bank the length of each port
that is in use (0 = unused).

After every sub-stage's twiddle multiplier there is one register. The
frame-start tag travels through the same registers.

## FIFO bank (`fifo_bank`)

An N-point SDF pipeline needs N − 1 feedback words in total, whatever the
radix order: (r−1)·D summed over all sub-stages. How those words are split
into chains depends on the size. The bank works like this:

* **One store.** It holds one 2048-word array with 16 chain ports (4 stages ×
  m ≤ 4).
* **Placement.** It places the active chains back to back: chain i starts at
  the sum of the lengths of chains 0 … i−1. Chains never overlap for any
  supported size.
* **Delay line.** Each chain is a circular buffer. Every cycle it returns the
  word written `len` cycles earlier and overwrites it with the new word.
* **Size changes.** If a size change leaves a pointer past its new chain
  length, the pointer restarts at 0. A new size can therefore take data on
  the cycle right after it is loaded.
* **Reads.** Reads are combinational, so chains of length 1 work.
* **Overflow.** `overflow` flags chain lengths that add up to more than the
  store. This never happens for the supported sizes.

The original bank uses four SRAM macros (256, 256, 736 and 1024 words of 32
bits) plus flip-flops. Its placement scheme is not reproduced here. In this
RTL the store is a plain array with many ports, which synthesizes to
flip-flops. Mapping it onto single-port SRAMs would need a placement that
gives each macro at most one access per cycle.

## Twiddle factors (`twiddle_unit`, `twiddle_gen`)

The 32 sizes have no common power-of-two period, so one sine ROM cannot
serve them all. Each of the twelve twiddle ports (three per stage) has its
own combinational CORDIC:

* **Angle.** The angle is built as a 32-bit fraction of a turn:
  angle = (e · round(2^40 / 3^lb)) >> (8 + la). This needs only a table of
  six constants, 2^40/3^b for b = 0 … 5.
* **Quadrant.** The top two bits of the angle select the quadrant.
* **Rotation.** The remaining quarter turn is rotated in 20 CORDIC steps.
  The atan table is atan(2^−i)/(2π)·2^32. The start vector is pre-scaled by
  the CORDIC gain 0.6072529, so the result needs no correction.
* **Output.** The factor comes out in Q1.15, with +1.0 saturated to 32767.
  The error is at most 2 LSB.

## Numbers and scaling

* **Samples.** A sample is `cplx_t`: a 16-bit signed real part and a 16-bit
  signed imaginary part, one 32-bit word.
* **Butterflies.** Butterfly arithmetic runs on 18 bits. Radix-2 results are
  halved and radix-3 results are quartered, with rounding and saturation,
  before they are stored or passed on.
* **Twiddled results.** These are rounded back to 16 bits and saturated.
* **Output scaling.** The core therefore outputs DFT(x) / (2^X · 4^Y) and
  cannot overflow internally.
* **Accuracy.** With inputs of ±8192, the end-to-end error against a
  floating-point DFT stayed at or below 3 LSB for all sizes.

## Interface and timing (`fft_top`)

| port | dir | meaning |
|------|-----|---------|
| `cfg_load`, `cfg_x[3:0]`, `cfg_y[2:0]` | in | load size 2^X·3^Y |
| `cfg_ok` | out | the last request was accepted |
| `n_pts[11:0]` | out | current N (2048 after reset) |
| `din`, `din_start` | in | one sample per cycle; `din_start` marks a frame's first sample |
| `dout`, `dout_valid`, `dout_idx[11:0]` | out | results; `dout_idx` counts 0 … N−1 |
| `fifo_overflow` | out | FIFO bank over-subscribed (never for supported sizes) |
| `ca_active[23:0]`, `cm_active[15:0]` | out | adder pairs and multipliers switched on, 6 and 4 bits per stage, stage 0 in the low bits |

* **Reset.** `rst_n` is an asynchronous, active-low reset.
* **Input.** A frame is N consecutive input samples. Frames may follow back
  to back. An assertion in `fft_top` reports a `din_start` that comes less
  than N cycles after the previous one (loading a size restarts that count).
* **No stalls.** There is no stall or back-pressure. The pipeline always
  runs, so it also flushes the last frame by itself.
* **Size changes.** Load a new size only while no frame is in flight.
* **Output.** Each frame leaves as N consecutive outputs. The first one
  appears N − 1 + S + P clock edges after the edge that took the frame's
  first sample. S is the number of radix sub-stages and P the number of
  pass-through stages. Examples: 2048 gives 2047 + 11 + 0, and 4 gives
  3 + 2 + 3.
* **Output order.** Outputs come in mixed-radix digit-reversed order. Write
  the output position p in the mixed radix of the sub-stages, in data order
  (first radix most significant). The frequency index k has the same digits
  with the weights reversed:

  k = d1 + r1·d2 + r1·r2·d3 + …

  The core has no reordering buffer.

## Files

* `rtl/fft_pkg.sv`: types (`cplx_t`, `rpe_mode_t`, `slot_cfg_t`,
  `tw_req_t`), sizes, and the rounding and scaling helpers.
* `rtl/fft_top.sv`: the top level.
* `rtl/rpe.sv`: the processing element. It uses `rtl/cplx_add.sv` (CA),
  `rtl/cplx_mul.sv` (CM) and `rtl/sdf_ctrl.sv` (the slot sequencer).
* `rtl/fifo_bank.sv`: the shared FIFO bank.
* `rtl/twiddle_unit.sv` and `rtl/twiddle_gen.sv`: the twiddle factors.
* `rtl/fft_ctrl.sv`: the size decoder and output framing.
* `tb/tb_*.sv`: one self-checking testbench per unit. Each prints
  `TB_RESULT checks=… failures=…`.

## Verification

| testbench | what it shows |
|-----------|---------------|
| `tb_fft_top` | All 32 sizes at the default parameters, in mixed order (so the size changes every run), with random data. Four sizes run two frames back to back. Each output is compared with a floating-point DFT at the digit-reversed position (tolerance 4 LSB). Also checks the exact latency, contiguous output framing, refusal of an unsupported size, that the adders and multipliers switched on per size add up to the per-mode counts, and that every mode, including pass, occurs. |
| `tb_rpe` | Each mode computes a complete 9, 6, 8, 4, 3 or 2-point DFT, against ideal FIFO and twiddle models. Also checks the latency, back-to-back frames, and that the numbers of active adders, active multipliers and chains match each mode's {j, k, m}. |
| `tb_fifo_bank` | Random chain layouts, including the 2047-word layout of N = 2048 and a full 2048 layout. Each word must come back exactly `len` cycles later. Also checks the overflow flag. |
| `tb_twiddle_unit` | 4800 random factors against cos/sin, including e = 0 and quarter turns. |
| `tb_fft_ctrl` | Accepts exactly the 32 points out of 128 requests. Checks the mode and slot delays and block lengths of every size, and the output framing. |

Simulate any of them with Verilator 5, for example:

```
verilator --binary --timing -Irtl rtl/fft_pkg.sv tb/tb_fft_top.sv \
          --top-module tb_fft_top -y rtl -y tb +libext+.sv
./obj_dir/Vtb_fft_top
```

The full-size end-to-end test runs in about a second.

## Where this departs from, or goes beyond, the original architecture

* **Pass mode.** The pass-through mode, the size-to-mode rule and the order of
  radices (radix-3 first) are choices made here.
* **Sequencing details.** The publication gives the banks and their per-mode
  use, but not the SDF schedules, the butterfly equations, the scaling or the
  register placement. These follow standard practice here.
* **CM6 usage.** The mixed-bank multiplier CM6 is used as the radix-3 constant
  multiplier in 2S-R3 and 1S-R3, and as a twiddle multiplier in 3S-R2 and
  2S-R2. This follows the per-mode multiplier counts and the published bank
  diagram. One sentence of the publication says a mixed bank's multiplier
  serves only 2S-R3 and R3-R2, which holds here for CM2 only.
* **FIFO bank.** The bank's placement rule is a simple back-to-back layout in
  one flip-flop array, not the published SRAM-based FIFO scheduling scheme.
  The foundry SRAM macros themselves are not modelled.
* **Twiddle unit.** The twiddle unit is a CORDIC. Its internals are not
  published.
* **Area and speed not evaluated.** The published results are 250 MHz,
  0.2325 mm² and 233.5 mW in 40 nm. Nothing here has been checked against
  them. The combinational CORDICs and the many-ported FIFO array make this RTL
  larger and slower than that implementation would be.
