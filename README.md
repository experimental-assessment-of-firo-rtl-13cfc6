# FIRO / GARO noise-source assessment platform

A ring oscillator built only from logic gates is the usual entropy source
for a true random number generator on an FPGA. A plain inverter ring tends
to settle into a clean periodic oscillation, though, and then yields little
entropy. Two generalisations fix this by adding XOR feedback taps, much as a
linear feedback shift register does, with inverters in place of flip-flops:

* the **Fibonacci ring oscillator (FIRO)**, where the taps are summed by an
  XOR chain that feeds the start of the ring, and
* the **Galois ring oscillator (GARO)**, where the feedback line is XOR-ed
  into the ring at each tapped stage.

Which taps are set is described by a feedback polynomial
`f(x) = 1 + c_1 x + ... + c_{r-1} x^{r-1} + x^r`. Some polynomials give
chaotic oscillation, some periodic, and some leave the ring stuck in a fixed
point. This RTL is the FPGA side of a platform that measures this. It
restarts a programmable FIRO or GARO from the same forced state every time.
It lets the ring run for a set number of clock cycles, captures **every**
ring node in flip-flops, and streams the raw state to a host together with
three candidate output bits. The host then counts distinct states and
computes entropies and statistical tests.

Default build: FIRO of 16 elements, GARO of 15 elements. These are the two
example sizes of the original study. Any length from 3 to 28 can be chosen
at build time.

## The two rings

Both rings are plain gates in a combinational loop. The loop is intentional
and is the oscillator. Synthesis and lint tools report it as a logic loop.
On an FPGA the nets need a keep attribute and hand placement (see below).

### FIRO (`firo_ring`)

```
 enable ─┐
         NAND ─ f_1 ─ INV ─ f_2 ─ ... ─ INV ─ f_r
 f_0 ────┘        │           │                │
   ^              c_1         c_2 ...          │
   └── XOR ◄── XOR ◄── ... ◄── XOR ◄───────────┘   (chain runs right to left)
```

* Elements 1..r from left to right. Element 1 is a NAND with `enable` as
  its second input. The others are inverters.
* The feedback starts at `f_r`. The look-up table at position `i` computes
  `fb_i = fb_{i+1} ^ (c_i & f_i)`, so each multiplexer and its XOR form one
  gate. The chain ends at `f_0`, the NAND input.
* `enable` low forces `f_1 = 1, f_2 = 0, ...` (alternating). Every run
  starts from that state.
* No fixed point exists iff `f(x) = (1+x) h(x)` with `h(1) = 1`. For even
  `r` that is `2^(r-3)` control vectors: 128 for r = 10 and 8192 for r = 16.
  The testbench checks the 128 by exhaustive simulation.
* Sampled bits: `out_j = f_{r-j}`. So `out_0` is the last inverter and
  `out_{r-1}` is the NAND output.

### GARO (`garo_ring`)

```
 f_0 ─► [INV ^ c_{r-1}·f_0] ─ f_{r-1} ─► [INV ^ c_{r-2}·f_0] ─ ... ─ f_1 ─► NAND ─ f_0
                                                                   enable ─┘
```

* Stages `r-1..1` from left to right. Each is one look-up table computing
  `f_i = ~in_i ^ (c_i & f_0)`. Its input is `f_0` for the first stage and
  the previous stage otherwise. The NAND closes the ring:
  `f_0 = ~(f_1 & enable)`.
* `enable` low forces `f_0 = 1`, and from it every other node.
* No fixed point exists iff `r` is odd and `f(1) = 0`, i.e. an even number
  of taps. That gives `2^(r-2) - 1` non-zero vectors, 511 for r = 11
  (checked by exhaustive simulation).
* **The top tap must stay clear.** With `c_{r-1} = 1` the first look-up
  table computes `~f_0 ^ f_0 = 1`, a constant. The feedback then cannot
  travel through the first stage, and the nodes up to the next tapped
  stage sit at fixed levels. The measurements behind this design found
  exactly this on hardware. The model reproduces it, and `tb_garo_ring`
  checks it.
* Sampled bits: `out_j = f_j`, so `out_0` is the NAND (feedback) node.

### Choosing a feedback vector

The study behind this design derived these rules. They are properties of
the silicon, not of the RTL:

* More taps gives more distinct states and less risk of periodic
  oscillation.
* Use the maximum number of taps that still gives no fixed point.
  * FIRO, even `r`: `r-2` taps. The number of such vectors is the largest
    even number `<= r/2`. For example, 4 vectors for r = 10 and 8 for
    r = 16.
  * FIRO, odd `r`: `r-3` taps if `r ≡ 3 (mod 4)`. If `r ≡ 1 (mod 4)`, use
    `r-1` taps (only one vector) or `r-3` taps.
  * GARO: `r-3` taps with the top tap clear. There are `r-2` such vectors.
* Minimum lengths on the measured device were 8 for a FIRO and 13 for a
  GARO.
* Only state sampling (below) passed the statistical tests in every case.

`tb_workload_tables` confirms these counts on the ring RTL. It covers FIRO
lengths 4 to 14 and odd GARO lengths 5 to 13. For each length it runs every
control vector. It checks that each vector without a fixed point keeps
oscillating, that a ring forced into a fixed point stays still, and that
the number of maximum-tap vectors is as listed above. It takes about a
minute and a half.

## Stop, run, sample: `restart_circuit`

Each sample is one independent run of the ring:

1. **Stabilise.** `enable` is low for `T_STABILISE` clock cycles. The ring
   settles into its forced state, and the sample flip-flops and the toggle
   flip-flop are cleared.
2. **Run.** `enable` rises on a clock edge. `sample` is high in the cycle
   before the edge `T_SAMPLE` clock periods later, and that edge captures
   all ring nodes.
3. **Hand-off.** `enable` stays high, which keeps the captured sample. The
   sample word is offered to the result FIFO. A full FIFO stalls the
   circuit here (`stalled` output) without losing the sample.

Without stalls, one sample takes `T_STABILISE + T_SAMPLE + 1` cycles and an
experiment takes `N_SAMPLES` times that. A time value of 0 counts as 1.
`enable` and `sample` come straight from flip-flops, because `enable`
drives asynchronous clears.

## Three ways to get one bit: `sampling_methods`

| bit | method | definition |
|---|---|---|
| `d_bit` | D flip-flop | captured `out_0` |
| `t_bit` | T flip-flop | a toggle flip-flop clocked by the `out_0` node counts its 0→1 transitions from ring start, modulo 2; captured with the state |
| `s_bit` | state sampling | XOR of all captured state bits |

State sampling is the method this design exists to support. It uses the
whole ring state instead of one node. In the measurements it was the only
method whose output was close to unbiased for every configuration. The
other two are kept for comparison, and as a way to detect a dead source.

## Host interface

`ro_assess_top` has two 32-bit FIFO streams. In the original set-up a
third-party bridge core connects them to an ARM processor. That core is
not part of this RTL, so the top brings its FIFO-side signals out as ports.

Command words (host → FPGA), `{opcode[31:28], value[27:0]}`:

| opcode | register | value |
|---|---|---|
| 1 | FIRO_CTR | bit `i-1` = tap `x^i` |
| 2 | GARO_CTR | bit `i-1` = tap `x^i` |
| 3 | T_STABILISE | clock cycles |
| 4 | T_SAMPLE | clock cycles from ring start to capture edge |
| 5 | SELECT | bit 0: 0 = FIRO, 1 = GARO |
| 6 | START | N_SAMPLES; starts the experiment |

Commands are not taken while an experiment runs. The next experiment can
therefore be queued in the 16-word command FIFO. The ring that is not
selected is held stopped.

Sample words (FPGA → host), `ro_pkg::sample_word_t`: bit 31 source
(1 = GARO), bit 30 `s_bit`, bit 29 `t_bit`, bit 28 `d_bit`, bits 27:0 the
raw state `out_{r-1}..out_0`, zero-extended. The sample FIFO holds 512
words.

A typical experiment: SELECT, the control vector, T_STABILISE, T_SAMPLE,
then START, then read `N_SAMPLES` words.

## How the rings simulate

A zero-delay loop cannot be simulated, so every ring element carries a
`#` delay:

* 250 ps for FIRO inverters and the NAND;
* 230 ps for FIRO feedback look-up tables;
* 270 ps for GARO stages;
* plus a fixed per-element offset below 23 ps (`ro_pkg::element_delay`),
  which stands for placement mismatch.

The values are estimates, not measurements. Synthesis ignores them. The
delays are written as `N * 1ps`, so they hold under any time unit.

The model has no noise of its own. Identical runs give identical samples,
unless the sampling clock moves relative to the ring. The testbenches add
random period jitter (±150 ps per half period) to the clock for that
reason. The distinct-sample counts and entropies they print describe this
model, so do not read them as predictions for silicon. What the model does
reproduce exactly is the logic:

* the forced states;
* fixed points, and which configurations rest in one;
* oscillation versus standstill;
* the GARO top-tap effect;
* the period of a plain ring;
* all sampling and sequencing.

## Files

| file | content |
|---|---|
| `rtl/ro_pkg.sv` | widths, opcodes, sample word, delay helper |
| `rtl/firo_ring.sv`, `rtl/garo_ring.sv` | the two programmable rings |
| `rtl/sample_reg.sv` | sample flip-flop array (enable = sample, clear = ring stopped) |
| `rtl/sampling_methods.sv` | D, T and state-sampling bits |
| `rtl/firo_noise_source.sv`, `rtl/garo_noise_source.sv` | ring + sampling |
| `rtl/restart_circuit.sv` | stabilise / run / sample sequencer |
| `rtl/config_regs.sv` | command decoder and experiment registers |
| `rtl/sync_fifo.sv` | show-ahead FIFO used for both streams |
| `rtl/ro_assess_top.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_ro_assess_top.sv` | end-to-end test at default sizes: FIRO and GARO experiments, FIFO-full stall, commands queued during a run, fixed-point configurations, exact cycle count |
| `tb/tb_workload_tables.sv`, `tb/firo_table_row.sv`, `tb/garo_table_row.sv` | every control vector of FIRO r = 4..14 and GARO r = 5..13: oscillation, fixed points, maximum-tap vector counts |
| `tb/tb_workload_sampling.sv` | FIRO r = 10 and GARO r = 11 with the feedback vectors of the original sampling-method comparison; prints distinct samples and the Shannon entropy of the three bits |

## Simulating

Verilator 5 with timing support is enough. Every testbench ends with
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_ro_assess_top rtl/ro_pkg.sv tb/tb_ro_assess_top.sv
./obj_dir/Vtb_ro_assess_top
```

Replace the top module for the other testbenches. All of them finish in
seconds, except `tb_workload_tables`. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/ro_pkg.sv rtl/<module>.sv`.
It warns about the ring loop and about unused package constants. Those
warnings are expected.

## Where this RTL departs from, or goes beyond, the original platform

* **Placement is not included.** The original constrained each ring to
  one logic array block:
  * FIRO: the inverters and their sample flip-flops in one block, and the
    multiplexer/XOR feedback chain in the neighbouring block;
  * GARO: two stages per logic module.

  It also used a keep attribute and instantiated the sample flip-flops as
  device primitives. Without such constraints the GARO measurements
  changed visibly. Add these constraints in the FPGA flow. The RTL
  describes the same gates, but infers the flip-flops.
* **Own choices:**
  * the command and sample word formats;
  * the FIFO depths and the single clock domain (the sample clock is the
    system clock);
  * the hand-off state and the stall of the restart circuit;
  * sampling with `out_0` for the D and T methods;
  * clearing the sample flip-flops while `enable` is low;
  * computing the three output bits in hardware.
* **N_SAMPLES** is counted in hardware and sent with START. The host only
  loops over experiments.
* **Not included:** the host-link core, the processor software (experiment
  loop, evaluation, statistical tests), and post-processing or online
  health tests. The original work names these as next steps and does not
  design them.
* **One source table entry is inconsistent.** The FIRO vector
  `[1,1,1,1,1,1,1,0,0]` (r = 10) is listed with six taps but has seven set
  bits, and a seven-tap FIRO has a fixed point. `tb_workload_sampling`
  runs it as listed. The ring then never starts, and the testbench checks
  exactly that.
