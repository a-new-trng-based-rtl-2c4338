# Coherent-sampling TRNG with self-timed rings

A true random number generator for FPGAs. Two free-running oscillators
at close but unequal frequencies are made to sample each other. The
moment at which one catches the other drifts by a small, jittery amount
every cycle, so the length of the resulting beat is random. The
generator keeps only the parity of that length.

Older designs of this kind use ring oscillators or a PLL. Ring
oscillators have to be placed and routed by hand for every device, and
PLLs are not available on every FPGA. Here both oscillators are
**self-timed rings (STRs)**. An STR of L stages gives L outputs at the
same frequency with evenly spread phases. Its frequency is set at reset
by the number of tokens loaded into it, not by careful placement. Each
stage pair is its own entropy source, so L samplers give L raw bits per
sampling clock. The default configuration has two 8-stage rings near
300 MHz, 8 samplers and a second-order parity filter. With a 1 MHz
sampling clock it delivers one 8-bit word every two cycles, which is
4 Mb/s.

```
            rst_n (reset phase: load tokens)
              |
   +----------+-----------+
   |                      |
 STR-A (L stages)      STR-B (L stages)
   | s_a[i]               | s_b[i]
   +------> cs_sampler[i] <--+         i = 0 .. L-1
              |  b[i]     <-- smpl_clk
              v
         raw_bits[L-1:0] ---> parity_filter (ORDER) ---> rnd_word, rnd_valid
```

## Files

| file | what it is |
|---|---|
| `rtl/trng_pkg.sv` | shared defaults (L=8, order 2, 4 tokens), start-up pattern and token-count functions |
| `rtl/str_stage.sv` | one ring stage, **behavioural model** with delay and jitter |
| `rtl/str_ring.sv` | L-stage self-timed ring, **behavioural model** |
| `rtl/cs_sampler.sv` | sampler: 4 flip-flops and an XOR (synthesizable) |
| `rtl/parity_filter.sv` | n-th order parity filter (synthesizable) |
| `rtl/trng_top.sv` | whole generator |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_trng_sweep` |

## The self-timed ring

A stage is a Muller C-element with its reverse input inverted. It has a
forward input F, taken from the previous stage, and a reverse input R,
taken from the next stage:

| F | R | C |
|---|---|---|
| 0 | 0 | hold |
| 0 | 1 | 0 |
| 1 | 0 | 1 |
| 1 | 1 | hold |

Stage i holds a **token** when its output differs from the output of
stage i+1, and a **bubble** otherwise. A token moves forward when the
stage ahead of it holds a bubble. A ring oscillates when it has at least
three stages, at least one bubble and an even number of tokens. It never
gains or loses tokens. At reset every stage is forced to a start value.
By default the first NT stages alternate 0,1 and the rest are 0. For
L=8 and NT=4 this gives outputs C0..C7 = `01010000`, which is four tokens
followed by four bubbles. The first stage to fire is stage 4, which gives
`01011000`. The ring then settles with tokens and bubbles alternating.
In that state all four tokens move one stage forward together, through
the states `01100110 → 00110011 → 10011001 → 11001100`. Every output
therefore has a period of four stage firings.

The rings are the one part that cannot be ordinary RTL, because they are
asynchronous loops whose behaviour comes from gate delays. On an FPGA
each stage is a single LUT (C-element and inverter) with its output fed
back, built as a hard macro so that all stages have the same delay.
`str_stage` models this with a `#` delay per firing, made of three
parts:

- a fixed `DELAY_PS`;
- a **Charlie term**. A stage is slower when its F and R events arrive
  close together. For events s ps apart the model adds
  ⌊√(`CHARLIE_PS`² + (s/2)²)⌋ − s/2. That is `CHARLIE_PS` for
  simultaneous events, and nothing once s/2 exceeds 4·`CHARLIE_PS`. This
  is what makes a real STR spread its tokens evenly;
- **jitter**: the sum of four uniform values in ±`JITTER_PS`, which is
  roughly Gaussian with σ ≈ 1.15·`JITTER_PS`.

The drafting effect, which is small on FPGAs, is not modelled.
A synthesis front end that accepts the model ignores the delays and
sees each stage as a latch. For a
real implementation, replace `str_stage` with the target's LUT macro,
keeping its ports.

Defaults: every stage has a 100 ps Charlie constant and 15 ps jitter.
STR-B stages have 728 ps, and the ring simulates at 301.6 MHz against a
300 MHz target. STR-A stages have 662 ps, which simulates at 327.6 MHz.
The gap between the rings makes the beat last 11.56 STR-B cycles in
simulation (about 38 ns). The prototype was characterised at
11.61 cycles. In silicon the two rings
are nominally identical, and their difference comes from placement.
Which ring is faster, and by how much, is this model's choice. NT is a
parameter. With NT=6 an 8-stage ring runs at a little over half the rate (about
170 MHz with the defaults). With NT=4,
pairs of stages four apart share one phase. If distinct phases matter,
choose NT so that L mod NT ≠ 0.

## The sampler (`cs_sampler`)

For every stage index i, output i of STR-B (`s_b`) samples output i of
STR-A (`s_a`):

1. **s0**: a D flip-flop clocked by `s_b` takes `s_a`. Because the two
   frequencies are close, s0 is a slow square wave (the beat). Its high
   and low runs last about 5 to 6 `s_b` cycles each. The exact run
   length varies with the jitter of both rings.
2. **c0**: a flip-flop clocked by `s_b` loads `c0 XOR s0`. It toggles
   once for every `s_b` cycle in which s0 was high. So c0 is the parity
   of the number of such cycles, which is where the randomness is
   collected.
3. **b**: two flip-flops on the external sampling clock `smpl_clk` bring
   c0 into the system clock domain. The value c0 has at one rising edge
   of `smpl_clk` appears on `b` after the next one.

The sampler does not count the beat period with a 1-bit counter latched
by s0, as earlier designs did. It uses this simplified parity scheme
instead. The choices of this implementation are that the c0 flip-flop is
clocked by `s_b`, that both output flip-flops run on `smpl_clk`, and that
all four have an asynchronous active-low reset.

The sampling clock sets the throughput: L bits per `smpl_clk` cycle. A
slower clock lets more jitter build up between samples, which gives
better raw bits. The prototype was characterised from 0.5 to 50 MHz, and
1 MHz was chosen.

## Postprocessing (`parity_filter`)

The filter works on each lane separately. It XORs ORDER consecutive raw
bits of the lane into one output bit, and the groups do not overlap.
This lowers bias and divides the throughput by ORDER. Each lane keeps
its last ORDER bits in a shift register, so there are ORDER·L flip-flops
in all. A modulo-ORDER counter pulses `valid` when a group is complete,
and `dout` is only meaningful during that pulse. The input is
registered, so the word shown with `valid` is made of the raw words that
came before the current one.

| sampling clock | order needed | output rate |
|---|---|---|
| 0.5 – 25 MHz | 2 | 8 bits / 2 cycles |
| 50 MHz | 3 (set `PF_ORDER=3`) | 8 bits / 3 cycles |

`PF_ORDER=1` gives the raw bits, one cycle late, with `valid` always high.

## Top level (`trng_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `rst_n` | in | 1 | reset phase, active low: loads both rings, clears all flip-flops |
| `smpl_clk` | in | 1 | external sampling clock |
| `raw_bits` | out | L | raw bits, one new word per `smpl_clk` cycle |
| `rnd_word` | out | L | filtered word |
| `rnd_valid` | out | 1 | `rnd_word` is new (every `PF_ORDER` cycles) |

Parameters: `L` (8), `NT` (4), `PF_ORDER` (2), `DELAY_A_PS` (662),
`DELAY_B_PS` (728), `JITTER_PS` (15), `CHARLIE_PS` (100). The reset is asynchronous and
resets everything. Release it away from a `smpl_clk` edge, or
synchronise it to `smpl_clk` in the surrounding system.

Register count: the samplers use 4·L = 32 flip-flops and the filter
uses ORDER·L = 16. The filter's group counter and valid flag add 2 more,
so the total is 50 flip-flop bits plus 16 ring latches. Without those
two, the structure needs 48 registers.

## Simulation

All files use `timescale 1ps/1ps`, and `tb_trng_top` uses 100 fs
precision. Simulation needs Verilator's timing support:

```
verilator --binary --timing --assert -Irtl -Itb rtl/trng_pkg.sv \
    tb/tb_trng_top.sv --top-module tb_trng_top -Mdir obj
./obj/Vtb_trng_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and has a
watchdog.

- `tb_str_stage`: checks the truth table over random input sequences,
  the exact delay without jitter, the ±4·`JITTER_PS` window with jitter,
  the Charlie term at three event spacings, and reset.
- `tb_str_ring`: loads the reset pattern and checks the first firing.
  It checks every output change against the firing rule, checks that
  the token count stays at 4 and 6, that all stages share one
  frequency, and that the default ring runs within 3 % of 300 MHz. It
  also checks that a jitter-free ring settles into the four-state
  evenly spread cycle.
- `tb_cs_sampler`: drives two jittery clocks that it generates itself
  and keeps an independent count of high s0 cycles. From that count it
  checks s0, c0 and b, and it checks the beat length.
- `tb_parity_filter`: runs orders 1, 2 and 3 against a reference built
  from the input history, and checks the cadence of `valid`.
- `tb_trng_top`: runs the full design at default parameters with a
  1 MHz clock for 180 µs of simulated time, about 4 s on one core. It
  checks ring frequencies and token counts, the s0 beat length, the c0
  toggle rule, the raw-bit latency, the filter output and the 4 Mb/s
  cadence, and that every lane gives both values. It also repeats a
  restart experiment: three resets from the same state, after each of
  which the first 20 raw words must differ from the other runs. It
  counts each mechanism (oscillation, beat, toggle, filter word, reset
  reload) and fails if one never happens.
- `tb_trng_sweep`: runs six generators side by side at 0.5, 1, 5, 10, 25
  and 50 MHz (order 3 at 50 MHz). It checks output rate and filter
  contents for each.

In simulation the randomness comes from `$urandom` in the stage model.
Runs with different `+verilator+seed+N` values therefore give different
bit streams. These testbenches check the structure and timing of the
generator. They do not judge the statistical quality of its output,
which is a property of the physical rings. The physical generator
passed NIST, DIEHARD, ENT and AIS31 tests. Those results describe the
hardware, and a simulation of this model does not reproduce them.

## Departures and limits

- The rings are behavioural models with assumed delays, an assumed
  Charlie curve and a simplified jitter model. Their timing is
  illustrative, not characterised. Because the models use `$time`, some
  synthesis front ends do not accept `str_stage`.
- The token count of the main configuration is not specified. Four
  tokens in eight stages is used.
- The group counter and valid flag of the filter are additions.
- The FIFO and serial link used to read bits out to a host during
  testing are not included.
