# Multiband pulse-swallow frequency divider (single-phase clock)

A PLL frequency synthesizer for several radio bands needs a programmable
feedback divider. It must divide a multi-gigahertz VCO clock down to the
reference frequency by any integer in a wide range. This RTL implements the
pulse-swallow divider topology used for that job:

* a fast **multimodulus prescaler** divides the VCO clock by N or N+1;
* two slow counters, **P** (programmable) and **S** (swallow), decide how
  many prescaler periods use N+1.

One output period is `(N+1)*S + N*(P-S) = N*P + S` input cycles. The
prescaler offers two modulus pairs:

* 32/33 for the 2.4 GHz band;
* 47/48 for the 5–5.8 GHz band.

With them a 7-bit P and a 6-bit S cover both bands in 1-step increments. In
the circuit this models, every flip-flop is a true-single-phase-clock
dynamic latch. The RTL keeps the logic function and the cycle timing of that
circuit, not its transistor-level form.

A second, independent design is included beside it: a divide-by-64/80 chain
made of a 4/5 prescaler and four SR flip-flops used as divide-by-2 stages.

## Programming and division ratio

| band | Sel (bit 5 of P) | N / N+1 | P | S | ratio N*P+S |
|---|---|---|---|---|---|
| 2.4 GHz | 0 | 32 / 33 | 75 .. 78 | 0 .. 31 | 2400 .. 2527 |
| 5 GHz | 1 | 47 / 48 | 105 .. 123 | 0 .. 47 | 4935 .. 5825 |

* The band is not a separate input. It is bit 5 (weight 32) of the P word,
  which is 0 for every low-band P and 1 for every high-band P.
* S must not exceed P. The words are static: a change takes effect at the
  next reload of the counters.
* With a 1 MHz reference, ratio 2400 means 2.400 GHz. Reaching 5.825 GHz
  needs P = 123 (47*123+44).
* Because the band follows P bit 5, some ratios cannot be reached with a
  7-bit P: 1024–1503, 3104–4511, and anything above 6032.

## The multimodulus prescaler (`mm_prescaler`)

This is the only fast part and the hardest part to get right. A 2/3
prescaler (`prescaler_2_3`) feeds a ripple chain of four divide-by-2 stages
(`toggle_stage`). One prescaler output period therefore spans 16 periods of
the 2/3 stage. Each of those 16 periods lasts 2 input cycles when the
modulus control `mc` is 1, or 3 when it is 0.

* **The ripple chain counts down.** Each stage toggles on the rising edge
  of the stage before it, so the four stage outputs form a down counter
  clocked by the 2/3 output.
* **The output `fp` is the last stage.** It rises when the counter wraps
  from 0 to 15.
* **`last` marks one slot.** It is the NOR of the four stage outputs, so it
  is true only during the final 2/3 period before the wrap. `mc` can change
  only in that slot:

| sel | mc | mod = 0 | mod = 1 |
|---|---|---|---|
| 0 | `~(last & ~mod)` | 15×2 + 3 = **33** | 16×2 = **32** |
| 1 | `last & mod` | 16×3 = **48** | 15×3 + 2 = **47** |

So `mod = 0` always selects N+1 and `mod = 1` always selects N, in both
bands. The 2/3 prescaler samples `mc` on the second input edge of each of
its periods. That sample falls in the `last` slot, long after the `fp`
rising edge that updates `mod`. The counters may therefore change `mod` on
`fp` with no timing hazard inside the prescaler.

In the 2/3 prescaler, `q1` is the output and `q2` adds the third cycle:
`q1 <= ~(q1|q2)` and `q2 <= q1 & ~mc`.

## Counters and the MOD flip-flop

Both counters are clocked by `fp`. They are built from `loadable_bitcell`,
a one-bit cell with three modes:

| ld | hold (MOD) | action |
|---|---|---|
| 1 | x | load the programming bit |
| 0 | 1 | idle: no switching |
| 0 | 0 | divide by 2 (toggle when all lower bits are 0) |

* **`p_counter` (7 bits).** It counts P, P-1, …, 1. At 1 a NOR of the upper
  bits raises `ld`, and the next edge reloads P instead of stepping to 0.
  `ld` is therefore high one `fp` period in every P.
* **`s_counter` (6 bits plus a MOD flip-flop).**
  * On `ld` it loads S and clears `mod`. If S = 0, `mod` is set at once.
  * It then counts down while `mod = 0`.
  * A NOR of its upper bits sets `mod` on the edge where the count steps
    from 1 to 0.
  * While `mod = 1`, `hold` freezes every cell. This is the power saving of
    the design: the swallow counter is still for the N*(P-S) cycles of the
    N phase.
* **`fout`.** It is `ld` registered on `fp`: high for one prescaler period
  per output period.
* **Programming rules.** Assertions in `multiband_divider` check the words
  at every reload: P >= 2 and S <= P.

## The divide-by-64/80 chain (`divided64`)

* `prescaler_4_5` is a two-flip-flop Johnson ring (divide by 4). A third
  flip-flop, enabled by `mc`, adds one state (divide by 5).
* Four `sr_flipflop` stages (`u1`..`u4`), each wired with `s = qb`,
  `r = q`, halve the frequency in turn.
* `f` has a 50% duty cycle and a period of 64 clocks (`mc = 0`) or 80 clocks
  (`mc = 1`). The chain has seven one-bit registers.
* This chain shares nothing with the multiband divider except the reset.
  `divider_top` simply places the two side by side.

## Where this RTL departs from, or fills in, the source design

* **Counter clocking.** The source builds the P and S counters as
  asynchronous ripple counters with asynchronous load. Here all cells of a
  counter share the `fp` clock and use toggle enables. A zero-delay model of
  an asynchronous load racing a ripple clock is not well defined. The
  division ratio is the same, and is checked cycle-exactly. The
  divide-by-2 stages of the prescaler and of `divided64` do ripple, as in
  the source.
* **Terminal count.** A P period is exactly P clocks: the reload replaces
  the zero state, as an asynchronous load would.
* **S = 0.** `mod` is set immediately on reload, so S = 0 gives exactly N*P.
* **Band select.** The source ties Sel to the top P bit and calls two bits
  fixed at 1. That contradicts its own P ranges. Here Sel is bit 5, and all
  7 bits stay programmable. Bit 3 is 0 for P = 112..119, so it cannot be
  fixed at 1.
* **47/48 polarity.** The description of the high band contradicts itself.
  This design follows the rule that MOD = 0 selects N+1 in both bands. The
  gates that form `mc` are a minimal choice of this design; the source names
  them but does not give their logic.
* **`divided64` internals.** Only the names, the ports and the register
  count of the 4/5 chain are known. Its gates, the SR behaviour for
  s = r = 1 (toggle), and `mc = 0` → divide by 64 are choices of this design.
* **Reset.** Every block has an asynchronous, active-high `rst`. The source
  does not specify reset.
* **Not modelled.**
  * The PLL around the divider (VCO, phase detector, charge pump, loop
    filter).
  * The transistor-level dynamic latches, and anything about power or
    maximum frequency.

## Files

| file | content |
|---|---|
| `rtl/divider_pkg.sv` | widths, N values, Sel bit, `division_ratio()` |
| `rtl/divider_top.sv` | both dividers side by side |
| `rtl/multiband_divider.sv` | prescaler + P + S counters |
| `rtl/mm_prescaler.sv`, `rtl/prescaler_2_3.sv`, `rtl/toggle_stage.sv` | 32/33/47/48 prescaler |
| `rtl/p_counter.sv`, `rtl/s_counter.sv`, `rtl/loadable_bitcell.sv` | programmable counters |
| `rtl/divided64.sv`, `rtl/prescaler_4_5.sv`, `rtl/sr_flipflop.sv` | divide-by-64/80 chain |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_band_sweep.sv` | every programming word of both bands |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself,
with a watchdog. For example:

```
verilator --binary --timing -Wno-fatal --top-module tb_divider_top \
  -y rtl -y tb +libext+.sv -Irtl rtl/divider_pkg.sv tb/tb_divider_top.sv
./obj_dir/Vtb_divider_top
```

What the testbenches check:

* **`tb_divider_top`** runs both designs at their default sizes:
  * the band edges 2400, 2527, 5000 and 5781, plus random words;
  * every output period against N*P+S, and the number of swallowed
    prescaler periods against S;
  * every `f` period against 64 or 80.

  It also counts each mechanism and fails if one never occurs: N+1 periods,
  idle N periods, reloads, both bands, S = 0, and both 4/5 moduli.
* **`tb_multiband_divider`** adds more words, including 5825 (P = 123,
  S = 44).
* **`tb_band_sweep`** measures all 1040 words of both bands (P 75..78 with
  S 0..31, and P 105..123 with S 0..47). It checks that every channel from
  2400 to 2527 and from 5000 to 5825 is reached. It runs in a few seconds.
* **`tb_mm_prescaler`** changes `mod` and `sel` at random on every `fp`
  edge, as the counters would, and checks each period against 32, 33, 47
  or 48.

The simulations are 2-state. Every flip-flop is reset, so none relies on an
initial value.
