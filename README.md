# An all-digital phase-locked loop with a counter-based time-to-digital converter

This design is a phase-locked loop made only of logic. A reference clock and the
divided output of a digitally controlled oscillator (DCO) are compared. The time
between their edges is measured in cycles of a fast clock, and that number steers
the oscillator. There are no analog charge pumps, capacitors or voltage-controlled
oscillators. The loop has five blocks in a ring:

```
 ref_in ──► pfd ──up/dn──► tdc ──word──► loop_filter ──carry/borrow──► dco ──id_out──┐
             ▲                                                                       │
             └──────────────── fb_out ◄── sdm_divider (÷ div_int + div_frac/256) ◄───┘
```

| block | what it does |
|---|---|
| `pfd` | Three-state phase/frequency detector. UP is high from a reference edge to the next feedback edge; DN is high from a feedback edge to the next reference edge. |
| `tdc` | Time-to-digital converter. A 6-bit up counter times UP and a 6-bit down counter times DN. They are added into a 7-bit word. |
| `loop_filter` | A pulse-forming network turns each word into count pulses. A modulo-K up/down counter counts them and gives a carry or borrow each time it wraps. |
| `dco` | Increment/decrement counter. It gives an output pulse every 2 clocks. A carry makes the next pulse one clock early; a borrow makes it one clock late. |
| `sdm_divider` | Fractional-N feedback divider with a first-order sigma-delta accumulator. |
| `adpll_top` | Wires the five blocks into the loop. |
| `adpll_pkg` | Shared constant (the 6-bit TDC width) and the word-to-error helper. |

Everything runs on one clock, `clk`. It is also the DCO's "ID clock", so the
oscillator's output edges always fall on `clk` edges. `ref_in` is sampled on
`clk`. The loop's timing resolution is therefore one `clk` period.

## How a phase error becomes a frequency correction

This is the part of the design that needs the most care, so here it is step by step.

1. **Detection.** Say the reference edge arrives *d* cycles before the feedback edge.
   Then `up` is high for exactly *d* cycles, starting one cycle after the reference
   edge. If the feedback leads, `dn` does the same. Edges in the same cycle give no
   pulse. `up` and `dn` are never high together; an assertion checks this.
2. **Conversion.** The up counter starts at `000000` and counts while `up` is high.
   The down counter starts at `111111` and counts down while `dn` is high. Their sum
   is the word, so `word = 63 + (up cycles) − (dn cycles)`. The value 63 means no
   error. The word appears, with a one-cycle `valid`, one cycle after the pulse ends.
   A pulse can be longer than the counters can hold. This happens while the loop is
   still far from lock, when the detector holds `up` or `dn` for whole reference
   periods. Each time a counter reaches full scale with its input still high, the TDC
   hands over a full-scale word (126 or 0) and starts a new measurement. Together,
   the words of one pulse always add up to its exact length.
3. **Filtering.** The loop filter adds each word's error (`word − 63`) to a signed
   pending count. The pulse-forming network then gives one count pulse per clock,
   counting up or down by the sign, until the pending count is zero. The up/down
   counter runs modulo `K_MOD` (8) and starts at `K_MOD/2`. Wrapping upward gives a
   one-cycle `carry`; wrapping downward gives a `borrow`. So one correction goes to
   the oscillator for every `K_MOD` cycles of net phase error.
4. **Oscillation.** The DCO normally gives one output pulse every `ID_DIV` (2)
   clocks. A carry shortens the next period to 1 clock; a borrow stretches it to 3.
   Corrections are queued, up to ±7. A queued correction is used up only by a
   period it actually moved.
5. **Division.** The divider counts DCO pulses. After `div_int` of them it gives a
   feedback pulse, or after `div_int + 1` when the accumulator overflowed at the end
   of the previous period. `div_frac` is added to the accumulator once per period.

**Loop dynamics.** Call the reference period *R* clocks and the divide ratio
*N = div_int + div_frac/256*. With no corrections, the feedback period is
*N·ID_DIV* clocks. Each net carry takes one clock off it. In lock the loop must
supply *N·ID_DIV − R* net carries per reference period. With the filter's gain of
1/K, that needs a steady phase error of

    e = K_MOD · (N·ID_DIV − R)   clock cycles   (positive: reference leads).

Per reference period, a phase error *e* becomes *e/K* of correction. The
error therefore shrinks by a factor of about *(1 − 1/K)* each period: a stable
first-order loop with no overshoot. The lock range is limited in two ways. The
error can be at most about one reference period, so *|N·ID_DIV − R| ≲ R/K*, which
is about ±12 % with the defaults. The DCO also makes at most one correction per
output period. The end-to-end test confirms the formula for *e*. At *N* = 32 and
*R* = 60 the largest error seen was 32 cycles (predicted 8·4 = 32). At *R* = 70 it
was 48 (predicted 8·6 = 48).

## Interfaces and timing

`adpll_top` ports (all synchronous to `clk`; `rst_n` is asynchronous, active low):

| port | dir | width | meaning |
|---|---|---|---|
| `ref_in` | in | 1 | reference clock, any duty cycle; only rising edges count |
| `div_int` | in | `DIV_W` (8) | integer part of the divide ratio, must be ≥ 1 |
| `div_frac` | in | `FRAC_W` (8) | fractional part, in 1/256 |
| `dco_out` | out | 1 | DCO output, a one-clock pulse per oscillator period |
| `fb_out` | out | 1 | divided feedback, a one-clock pulse per period |
| `up`, `dn` | out | 1 | detector outputs |
| `tdc_word`, `tdc_valid` | out | 7, 1 | converter result and its strobe |
| `lf_count` | out | 3 | loop-filter counter content |
| `carry`, `borrow` | out | 1 | oscillator corrections |
| `lf_pulse`, `lf_dir_up` | out | 1 | pulse-forming network count pulse and direction |
| `div_extra` | out | 1 | the current divider period is `div_int + 1` long |

Latencies: from an input edge to `up`/`dn` is 1 clock. From the end of a pulse to
`tdc_valid` is 1 clock. From `tdc_valid` to the first count pulse is 1 clock, with
`|error|` pulses on consecutive clocks. From a wrapping count to `carry`/`borrow`
is 1 clock. From the DCO pulse that closes a divider period to `fb_out` is 1 clock.

Parameters (defaults in brackets): `TDC_BITS` [6] sets the counter width, and the
word is `TDC_BITS+1` bits. `K_MOD` [8] is the loop-filter modulus, which sets loop
gain and lock range. `ID_DIV` [2] is the free-running DCO period in clocks, at
least 2. `DIV_W` [8] and `FRAC_W` [8] are the divider widths. After synthesis the
whole loop is about 150 word-level cells and 66 flip-flops.

## What is specified and what is chosen here

These parts follow the source design:
- the ring of blocks and their order;
- the detector made of two flip-flops with D tied high and a gate that clears both;
- the 6-bit up counter starting at `000000`, the 6-bit down counter starting at
  `111111`, their adder and the 7-bit word;
- the converter counting only while there is a mismatch;
- a loop filter made of a pulse-forming network and an up/down counter;
- a DCO made of an increment/decrement counter, with INC fed by carry, DEC fed by
  borrow, and moves of one ID-clock period;
- a first-order sigma-delta modulator in place of a plain divider.

These are this design's own choices:
- **Synchronous detector and converter.** The source draws both as self-timed
  circuits. Here they are sampled on the ID clock, which limits resolution to one
  clock period.
- **No extra circuitry between detector and converter.** The source says some is
  needed to form event and direction signals, but does not describe it. Here UP and
  DN enable the two counters directly.
- **Measurement framing in the TDC.** When a measurement ends, the strobe, and the
  full-scale split for long pulses (step 2 above) are choices made here.
- **TDC output goes to the loop filter.** The source also calls the TDC word the
  DCO's control word, and says a "decoder" sets the DCO's pulse width. No decoder
  is described, and the DCO is controlled by carry and borrow. So the word feeds the
  loop filter, and the filter's carry/borrow drive the DCO.
- **No second detector.** The source's block diagram shows a second phase detector
  between the loop filter and the DCO. It is not described anywhere, so none is
  built.
- **`K_MOD` = 8 and the pending count.** The modulus and the signed pending count
  of the pulse-forming network are choices made here, so that words arriving
  close together are not lost.
- **No model-predictive control.** The source calls the loop filter
  "model-predictive" but gives no model, horizon or cost weights. Only the
  pulse-forming network and counter are implemented. A real predictive controller
  would replace `loop_filter`, keeping its word-in and carry/borrow-out interface.
- **DCO period.** `ID_DIV` = 2, the correction queue and INC/DEC cancelling are
  choices made here.
- **Divider structure.** The divider is the standard accumulator-overflow
  fractional-N form. Its widths are chosen here.

Not implemented:
- the tapped-delay-line form of the TDC (current-starved delay cells sampled by
  twelve flip-flops), which is an analog, process-specific circuit;
- the LiDAR system around the converter (laser trigger, scanning motor, range
  processing, optics). These are only named in the source.

The TDC resolves one clock period. At a few hundred MHz that is several
nanoseconds, far coarser than the 133 ps a 2 cm ranging accuracy would need. This
RTL is the loop, not a precision time-of-flight front end.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares the block
against values worked out independently, and prints
`TB_RESULT checks=N failures=M`:

- `tb_pfd` checks pulse width and start cycle for random edge distances in both
  orders, and coincident edges.
- `tb_tdc` checks word value and one-cycle latency for UP/DN widths of 1–200 cycles.
  This includes the full-scale splitting: the sum of the errors equals the pulse
  length, with the expected number of words.
- `tb_loop_filter` checks the net number of count pulses, the counter content
  (`(4 + Σerror) mod 8`), and the net carries minus borrows equal to the number of
  wraps. Words are sent back to back so that they overlap.
- `tb_dco` checks the sum of output periods after INC/DEC bursts applied at random
  phases. It also checks the free-running period and the period range.
- `tb_sdm_divider` checks the cumulative DCO pulses after *P* periods against
  `P·div_int + ⌊(P−1)·div_frac/256⌋` for several ratios and input rates.
- `tb_adpll_top` runs the whole loop at its default parameters. It uses six
  reference periods and ratios, including fractional ones and ones that pull the
  DCO faster and slower. After settling, it checks that the number of feedback
  pulses equals the number of reference edges within one. It also checks that the
  average DCO period times the ratio equals the reference period within 0.05 clock.
  It counts up/down pulses, conversions, full-scale TDC words, words that arrive
  while count pulses are still pending, carries, borrows, advanced and delayed DCO
  periods, and `div_int + 1` divider periods, and fails if any never happened. It
  takes well under a second.

Each testbench was also run against a copy of its block with one deliberate bug,
and reported failures.

## Simulating

With Verilator 5 (`--timing` is needed for the testbench clocks):

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_adpll_top \
          rtl/adpll_pkg.sv tb/tb_adpll_top.sv -y rtl -y tb +libext+.sv
./obj_dir/Vtb_adpll_top
```

Replace `tb_adpll_top` with any other testbench name to run that test. The
simulator has two states, so every flip-flop has a reset value. To try another
lock point, change `lock_test(div_int, div_frac, ref_period)` calls in
`tb_adpll_top`. Keep `ref_period` within about ±12 % of
`(div_int + div_frac/256)·2` clocks with the default `K_MOD`, or make `K_MOD`
smaller. That widens the range, but each cycle of phase error then moves the DCO
more, so the loop filters less jitter.
