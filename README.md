# Resource-limited signal processing engines: folded DWT, folded FIR, turbo give-up control

Three pieces of DSP hardware share one idea. Each spends as little datapath as the
required throughput allows and reuses it over time:

* a **multi-octave discrete wavelet transform (DWT)** that runs the lowpass and
  highpass filters of every octave on a small, fixed number of multiply-accumulate
  units (MACs). A precomputed table schedules the work. Its inverse runs on the
  same kind of datapath;
* two **folded FIR filters** (33 taps on 3 multiplier-adders). One broadcasts each
  input sample to all units ("parallel-in"). The other splits the filter into short
  sub-filters joined by delay lines ("serial-in");
* the **control of a turbo decoder** that saves iterations in two ways. It gives up
  early on packets that will not converge, and it reuses the last a-priori
  information when such a packet is sent again.

The designs are independent. `lrvlsi_top` places them side by side, each with
its own ports, so that they can be built and simulated together.

```
rtl/  dwt_pkg  dwt_controller  dwt_mac  dwt_processor  idwt_processor
      fir_pkg  fir_ma  fir_parallel_in  fir_serial_in
      turbo_pkg  llr_mem  egu_detector  turbo_decoder
      lrvlsi_top
tb/   one self-checking testbench per block, tb_lrvlsi_top (end to end),
      siso_model (behavioural stand-in for a soft-in soft-out decoder)
```

## 1. The MAC-scheduled DWT

### Problem

One octave of a 1-D DWT filters the signal with an m-tap lowpass and an n-tap
highpass filter and keeps every second output. For the (9,7) biorthogonal basis,
m=9 and n=7. Each pair of new input samples therefore costs m+n = 16
multiplications. Octave 2 repeats this on the lowpass outputs of octave 1 at half
the rate, and so on.

With r MACs, one pair of inputs for one octave takes a **scheduling period** of
`q = ceil((m+n)/r)` cycles. For the default r=4 that is q=4 cycles. A period always
works on a single octave.

### Schedule tables

Within a period, each MAC in each cycle needs four choices. The design holds them as
one table row per cycle, `q × r` entries of `mac_op_t`:

| field | meaning |
|---|---|
| `coef` (coefficient matrix) | which filter tap to multiply by |
| `b2` (data matrix) | which buffered sample: B1 (older) or B2 (newer) of the pair |
| `acc` (accumulate matrix) | which partial-sum register receives the product plus feedback |
| `fb_en`, `fb` (feedback matrix) | which partial-sum register is added to the product |

The entries are not stored as constants. `dwt_pkg::sched_op()` computes them at
elaboration from (m, n, r), so other filter lengths and MAC counts need no hand-made
table. The rule:

* Number the taps from 1: L1..L9 and H1..H7.
* List the products of a period in this order: L2, L4, …, then H2, H4, …, then
  L1, L3, …, then H1, H3, ….
* Deal them to the MACs row by row.
* Even-numbered taps multiply the older sample B1. Odd-numbered taps multiply the
  newer sample B2.

Each octave has a bank of partial-sum registers, one per tap (`rb[stage][*]`).

* The product for tap i is added to the register of tap i+1 and written to the
  register of tap i.
* Even-numbered taps run first and read registers from the previous period. An
  odd-numbered tap then reads the register its even neighbour has just written.
  So each period advances a transposed-form filter by two samples: R1 gets
  L1·B2 + L2·B1 + (R3 of the last period).
* After the period, register 0 of the lowpass and register 0 of the highpass hold
  the two new outputs.
* The decimation by two comes free: only even-phase outputs are ever formed.

### Octave sequencing

Octave s+1 needs two approximations from octave s before it can run. The controller
picks each period's octave as soon as possible:

* After a period of octave s, if octave s+1 already holds one approximation, it now
  has a pair. The next period runs octave s+1 on that pair (`load_oct`).
* Otherwise the new approximation is held as the first of a pair (`store_half`), and
  the next period takes a new input pair (`load_in`).
* With S=3 octaves the pattern repeats every 2^S−1 = 7 periods per 8 input samples:
  1,2,1,3,1,2,1. The octave-S approximation and detail appear once per 7 periods.
* If no input pair is waiting, no period starts and `stall_o` is raised. Idle cycles
  therefore show up as stalls, not as wasted periods.

### Datapath (`dwt_processor`)

* **Input:** a valid/ready input queue of 4 entries feeds two sample registers B1/B2
  (ping-pong).
* **MACs and storage:** `NUM_MAC` MACs, a writable coefficient bank (reset to the
  CDF 9/7 analysis filters in Q2.14), the per-octave partial-sum banks, and one
  hold register per octave for the waiting approximation.
* **Result format:** results are shifted right by 14 bits (truncation) and saturated
  to 16 bits.
* **Outputs:** one registered output per period: the octave number and its detail
  coefficient. For the last octave, also the approximation.

Timing: an output appears one cycle after the last cycle of its period. At full load
the input rate is 2 samples per period of octave 1. With 3 octaves, 8 samples take
7 periods = 28 cycles.

### Inverse transform (`idwt_processor`)

One synthesis level turns an approximation stream x and a detail stream y into a
signal at twice the rate. It upsamples both by two, filters them with L' and H', and
adds the two branches. Per pair (x_k, y_k) this again costs m'+n' = 16
multiplications, so the same q=4-cycle period on 4 MACs yields two output samples.

The schedule is the forward one with three changes:

* **Inputs.** x meets every L' coefficient and y every H' coefficient. There is no
  even/odd split of the taps.
* **Feedback.** Register i takes its addend from register i+2, not i+1. A
  transposed-form filter on an upsampled input advances by two samples per input
  sample, so the zero samples cost nothing.
* **Outputs.** Two extra adders form the outputs. The even sample is
  `R_L[0] + R_H[0]`, the odd sample is `R_L[1] + R_H[1]`.

Coefficients:

* The reset coefficients are the (9,7) synthesis pair, L'(z) = −H(−z) (7 taps) and
  H'(z) = L(−z) (9 taps).
* These cancel the aliasing of the forward transform.
* One level then returns its input 7 samples late, within about 2 LSB of
  truncation error.

Levels:

* Every input set carries a level number, and each level has its own register bank.
* A full multi-level inverse is run by the caller. It sends level S−1 first, then
  pairs the reconstructed approximations with the next level's details. Interleaving
  levels is allowed.
* Multi-level reconstruction needs the details delayed to match the 7-sample
  synthesis delay of each level. The caller handles this.

## 2. Folded FIR filters (33 taps, 3 units)

Both filters compute `y(n) = Σ h[i]·x(n−i)`:

* 8-bit samples and 16-bit coefficients;
* a full-precision 30-bit result, with no rounding;
* one sample accepted per f = ceil(K/r) = 11 cycles.

Coefficients are loaded through a write port while the filter is idle. Both filters
use a valid/ready handshake on the input and a one-cycle `out_valid` pulse.

**Parallel-in** (`fir_parallel_in`)

* **Mechanism:** the new sample is held for f cycles and sent to all r units.
  A K-word register file holds the transposed-form partial sums. In cycle c, unit j
  updates tap t=c·r+j: `R[t] = x·h[t] + R[t+1]`, where R[t+1] still holds the
  previous sample's value.
* **Output:** `R[0]` is y(n), valid one cycle after the last update cycle.
* **Storage:** K partial sums only.

**Serial-in** (`fir_serial_in`)

* **Mechanism:** H(z) is split into r sub-filters of f taps, `Σ_i z^(−f·i)·H_i(z)`.
  Unit i computes sub-filter i by accumulating f products over the f cycles. The
  coefficients rotate in a per-unit ring, and one f-sample window of recent inputs
  circulates under them.
* **Delay lines:** the z^(−f·i) terms are f-deep delay lines between the units. At
  each period end, the line into unit i takes the chained sum of units i+1…r−1.
* **Latency:** f = 11 cycles.
* **Storage:** an f-sample window, r·f coefficients and (r−1)·f delay words.
* **Limit:** K must be a multiple of r.

**Register cost.** For the 33-tap case, the register file of the parallel-in filter
plus its coefficients is K·30 + K·16 bits, about 1.5 kbit. The serial-in filter
holds r·f coefficients, 2r short accumulators/latches and (r−1)·f delay words of 30
bits, plus an 88-bit sample window. Both synthesise to about 1.5 kbit of
flip-flops. The serial-in style pulls ahead as f grows, because its delay lines
shrink with r, while the parallel-in register file always holds K words.

## 3. Turbo decoder control with early give-up and state reuse

`turbo_decoder` runs the iteration loop around two soft-in soft-out (SISO)
decoders. The SISO itself is external: its request/response ports appear as
`td_siso_*` on the top.

* **LLR memories.** There are two a-priori memories, each `BLK_LEN` × 8-bit. SISO-2
  writes the one that SISO-1 reads, and the other way round. A per-word valid flag
  clears a memory in one cycle. An unwritten word reads as zero.
* **Flow.**
  1. Initialise.
  2. SISO-1, then SISO-2.
  3. Early-termination check: hard decisions of SISO-2 agree with its previous
     pass.
  4. Repeat: SISO-1, early give-up check, SISO-2, termination check.
  5. Stop at `MAX_ITER` iterations.
* **Early give-up** (`egu_detector`).
  * During each SISO-1 pass it adds up |Le1|. The mean is taken by a shift, so
    `BLK_LEN` must be a power of two.
  * A pass counts as "no rise" when its mean is below the highest mean so far plus
    `INC_TH`.
  * `OSC_LEN` consecutive no-rise passes mean the extrinsic information only wobbles
    in a band. The packet is declared unsolvable and `resend_req_o` pulses.
* **State reuse.** After a give-up, the SISO-1 a-priori memory is kept. If the next
  packet arrives with `pkt_resend_i`, that memory is not cleared, so decoding starts
  from the previous guess instead of zero. `reused_o` reports this.
* **Result.** `result_o` is one of decoded, gave up or iteration limit. `passes_o`
  gives the SISO passes used. The decoded bits are read through `dec_raddr_i`.

## Where this departs from the source description

* **Block length and thresholds are this design's choices.** BLK_LEN=1024,
  LLR_W=8, MAX_ITER=8, INC_TH=4 and OSC_LEN=3 are all parameters. The source
  describes give-up only as "oscillation within a bounded range".
* **Early termination** uses hard-decision agreement, one of the usual classes.
* **DWT latency.** Outputs are registered at period ends, so latency counts whole
  periods. The source's formula assumes the first output half-way through a period.
* **The inverse DWT is partly this design's own.** The source gives only the
  principles of its schedule: each input meets every coefficient, feedback steps
  by two, and two extra adders combine the branches. The exact table, the level
  tagging and the synthesis coefficients are this design's choices. The order of
  levels is left to the caller, not scheduled inside.
* **Only the 1-D transforms are built.** The 2-D row/column stream units, transpose
  memory and on-chip SRAMs of the full DWT chip are not built.
* **Interfaces are this design's own.** Coefficient write ports, valid/ready
  handshakes and word widths not given in the source (DWT coefficient format Q2.14,
  accumulator widths) are design choices.
* **The SISO (log-MAP) decoder is not built.** The testbenches use a behavioural
  model that converges, diverges or wanders, depending on a mode input.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself. It also
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/dwt_pkg.sv rtl/fir_pkg.sv rtl/turbo_pkg.sv rtl/*.sv tb/siso_model.sv \
  tb/tb_lrvlsi_top.sv --top-module tb_lrvlsi_top -o sim && obj_dir/sim
```

The packages come first so that they are compiled before the modules that import
them. Listing them twice through the glob is harmless. For a block testbench,
replace the last file and the top module name. `tb_dwt_processor` also needs
`tb/dwt_proc_bench.sv`, and the turbo testbenches need `tb/siso_model.sv`.

| testbench | what it checks |
|---|---|
| `tb_dwt_controller` | with r=3: the schedule tables and octave order over 40 periods, and stall |
| `tb_dwt_processor` | at 4 MACs (default) and 3 MACs: 256 samples against a direct decimated-convolution model, saturation, spacing of periods (q=4 / q=6), stalls; the checks live in `dwt_proc_bench` |
| `tb_idwt_processor` | three interleaved levels against a direct upsample-filter-add model, with saturation; perfect reconstruction of a forward-transformed random signal (7-sample delay, ±3 LSB) |
| `tb_fir_parallel_in`, `tb_fir_serial_in` | 300 random samples and random coefficients against direct convolution; latency and one-per-11 rate |
| `tb_fir_k255` | both filter styles at 255 taps, 8-bit samples, for folding factors 17 (15 units) and 51 (5 units) against direct convolution and the one-per-f output rate |
| `tb_egu_detector` | packets whose mean rises steadily, oscillates, or rises once and resets the count; clearing between packets |
| `tb_turbo_decoder` | decoded, given-up, resent-with-reuse, iteration-limit and resend-without-saved-state packets |
| `tb_lrvlsi_top` | all engines at full default size, run together. It counts each mechanism and fails if any never happens: DWT stall, higher-octave periods, saturation, back-pressure on all four inputs, inverse-DWT reconstruction of the same signal (exact against the model, within 3 LSB of the input), early termination, give-up, reuse and iteration limit |

The end-to-end testbench runs with every parameter at its default and takes a few
seconds.
