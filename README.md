# 27-level digital sinusoidal PWM for a cascaded H-bridge inverter

Three H-bridges in series are fed from DC sources in the ratio 9 : 3 : 1
(108 V, 36 V and 12 V in the reference prototype). Each bridge can add
+V, 0 or -V to the output, so the output is

    V_out = (9*d1 + 3*d2 + d3) * 12 V,    d1, d2, d3 in {-1, 0, +1}

and the three digits form a balanced-ternary number. That gives 27 output
levels, -13 ... +13, from only 12 switches. This RTL is the digital
controller for such an inverter. It makes a 60 Hz sine reference and modulates
it against 26 stacked triangular carriers (phase-disposition multilevel PWM).
It then turns the 26 comparison results into the 12 IGBT gate signals. It
follows a published FPGA implementation for a Spartan-3E at 50 MHz, and it
keeps that implementation's counter values and its switching equations.

## Signal chain

```
 sample_timer ──tick──> rom_address_counter ──addr──> sine_rom ──modulating──┐
   (0..1666)                 (0..499)               (500 x 14 bit)           │
                                                                              v
 carrier_timer ──phase──> triangle_gen ──carrier──> carrier_comparator_bank ──pulse[25:0]──>
   (0..2999)              (0..350 staircase)        (26 carriers, 26 compares)
                                                        hbridge_switch_logic ──gates (12)──>
```

Everything runs on one clock, `clk` (50 MHz), with one asynchronous
active-high clear, `clr`. `dspwm27_top` wires the blocks together. Its outputs
are the gates and the internal signals worth probing: the reference, the main
carrier, the 26 pulse trains and the ROM location.

### Reference

The sample timer counts 0..1666, which is 1667 clocks. On each wrap the ROM
address advances by one location, out of 500. One sine period is therefore
500 × 1667 = 833,500 clocks, which is 59.99 Hz at 50 MHz. Location *i* holds

    round(4550 + 4550 * sin(2*pi*i/500))

so the reference spans the codes 0..9100. A constant function computes the
table during elaboration, so no data file is needed. The function uses a
Taylor series after folding the angle into [0, π/2]. The ROM has a one-clock
registered read. When `rd_en` is low, and from `clr` until the next read, its
output reads 0.

### Carriers

The carrier timer counts 0..2999, so each carrier period is 3000 clocks
(16.67 kHz). During the first half of that period (phase < 1500) the main
triangle rises, and during the second half it falls. The carriers are stacked
350 codes apart. The triangle must therefore swing 0..350 and not 0..1500, so
that the 26 carriers exactly cover the 0..9100 range of the reference.

`triangle_gen` achieves this with a Bresenham-style staircase:

- An accumulator adds 350 every clock.
- Each time the accumulator reaches 1500, the carrier takes one unit step and
  the accumulator drops by 1500.
- After 1500 clocks the carrier has climbed exactly 350 steps, and after
  another 1500 clocks it has fallen exactly 350 steps.

After *n* clocks of a half period, the carrier is `floor(n*350/1500)` above
where that half started. The waveform therefore repeats without drift.
Setting `PEAK = HALF` gives a plain up/down counter that moves by one every
clock.

Carrier *k* (k = 1..26) is the main triangle plus 350·(k−1). Comparator *k*
outputs 1 when the reference is strictly greater than carrier *k*. Because the
carriers do not overlap, the 26 outputs always form a thermometer code, and
an assertion checks this. Let *c* be the number of ones in that code. The
output level is then *c* − 13.

## From 26 pulses to 12 gates

Each bridge has four switches. S1 and S2 form one leg, S3 and S4 the other,
and each pair is driven complementarily:

| bridge state | on      | gates S1 S2 S3 S4 |
|--------------|---------|-------------------|
| +V           | S1, S3  | 1 0 1 0           |
| 0            | S2, S3  | 0 1 1 0           |
| −V           | S2, S4  | 0 1 0 1           |

Only S1 and S3 of each bridge need logic; S2 = ¬S1 and S4 = ¬S3. The digit
*d* of a bridge is +1 exactly when S1 is on, and is ≥ 0 exactly when S3 is
on. The equations below decode *c* into those conditions. They are written
in terms of p1..p26:

- For k ≥ 14, p_k is comparator *k*'s output (reference above carrier *k*).
- For k ≤ 13, p_k is its complement (reference below carrier *k*).

```
bridge 1 (9V):  S11 = p18
                S13 = ¬p9
bridge 2 (3V):  S21 = p24 + ¬p18·p15 + p9·¬p6
                S23 = p21 + ¬p18·¬p12 + p9·¬p3
bridge 3 (1V):  S31 = p26 + ¬p24·p23 + ¬p21·p20 + ¬p18·p17 + ¬p15·p14
                    + p12·¬p11 + p9·¬p8 + p6·¬p5 + p3·¬p2
                S33 = p25 + ¬p24·p22 + ¬p21·p19 + ¬p18·p16 + ¬p15·¬p13
                    + p12·¬p10 + p9·¬p7 + p6·¬p4 + p3·¬p1
```

The equations for the upper half pick out *windows* of *c*. For example,
¬p18·p15 is true for c = 15..17, where bridge 1 sits at 0 and bridge 2 must
be at +1. Because the lower pulses are complemented, the lower-half terms
read the same way: p9·¬p6 is c = 6..8. The bridges switch at rates that
differ by a factor of three:

- Bridge 1 changes state only at c = 9 and c = 18.
- Bridge 2 changes state every 3 levels.
- Bridge 3 changes state at every level.

The gates are registered, and clearing the design turns all 12 gates off.
Another assertion checks that no leg ever has both switches on or both off.

## Timing

| stage                       | latency                      |
|-----------------------------|------------------------------|
| sample tick → new ROM address | same clock edge            |
| ROM address → `modulating`  | 1 clock                      |
| `modulating`, `carrier` → `pulse` | 1 clock                |
| `pulse` → `gates`           | 1 clock                      |

In total there are 3 clocks from a change of address to the gates. This is
negligible against the 1667-clock sample period and the 3000-clock carrier
period.

## Parameters

| where | parameter | default | meaning |
|---|---|---|---|
| `dspwm27_top` | `SAMPLE_DIV_P` | 1667 | clocks per reference sample |
| `dspwm27_top` | `ROM_DEPTH_P` | 500 | samples per reference period |
| `dspwm27_top` | `CARRIER_DIV_P` | 3000 | clocks per carrier period |
| `dspwm_pkg` | `CARRIER_STEP` | 350 | carrier peak and spacing, codes |
| `dspwm_pkg` | `CODE_W` | 14 | reference/carrier code width |
| `sine_rom` | `OFFSET`, `AMPL` | 4550, 4550 | reference offset and amplitude (full depth) |

To get other reference frequencies, change `SAMPLE_DIV_P`:

    f_ref = f_clk / (SAMPLE_DIV_P * ROM_DEPTH_P)

`AMPL` sets the modulation depth. With a smaller `AMPL` the outer levels are
used less often, or not at all. The level count (27), the bridge count (3)
and the switching equations are fixed.

## What follows the reference design and what does not

The following are taken from the reference design:

- the counter ranges (0..1666, 0..499, 0..2999);
- the rise/fall split of the carrier at 1500;
- the 350-code carrier offsets and the 26 carriers;
- the comparison rule;
- the switching table;
- the sum-of-products equations for S11..S34;
- the choice of S2/S3 for the zero state;
- the asynchronous clear.

The following are this design's own choices:

- **Carrier amplitude.** A literal up/down counter would reach 1500, and
  carriers 350 apart would then overlap. Here the triangle keeps the
  1500/1500-clock timing but is scaled to a 0..350 staircase, so the carrier
  stack and the reference share the same 0..9100 range.
- **Polarity of the lower pulses.** The switching equations only produce the
  switching table when pulses 1..13 are read as "reference below carrier".
  The RTL uses one uniform comparator bank and complements those 13 inputs in
  the switching logic.
- **ROM contents, width and read style.** The ROM holds a full-depth sine
  computed by formula, 14 bits wide. The read is registered, and the output
  reads 0 when `rd_en` is low or after a clear (the reference design releases
  a tri-state bus instead).
- **Ties.** When the reference equals a carrier, the pulse is 0.
- **Pipeline registers.** The comparators and gates are registered.
- **No dead time** is inserted between complementary gates. A real gate
  driver needs dead time, either in the driver or in an added stage after
  `gates`.
- **Carrier frequency.** The carrier frequency is 16.67 kHz, which is 278
  times the reference frequency. It comes from the 3000-clock counter, not
  from a 10:1 carrier-to-reference ratio.

The DC sources, the IGBT bridges and the R/RL/RC/RLC loads are analog and are
not modelled in RTL. The top-level testbench rebuilds the converter's output
level from the gates with the equation at the top of this file.

## Verification

Each module in `rtl/` has a self-checking testbench `tb/<module>_tb.sv`. Each
one ends by printing `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `sample_timer_tb` | count sequence; ticks exactly 1667 clocks apart; async clear |
| `rom_address_counter_tb` | steps only on `advance`; wraps 499 → 0; `wrap` flag |
| `sine_rom_tb` | all 500 words against `$sin` (±1 code); 0 and 9100 extremes; half-period symmetry; read latency |
| `carrier_timer_tb` | 0..2999 sequence; 3000-clock period |
| `triangle_gen_tb` | carrier against the closed-form staircase every clock; peak 350; a `PEAK = HALF` instance as a plain counter |
| `carrier_comparator_bank_tb` | 26 pulses against reference > triangle + 350(k−1), including exact ties; every pulse count 0..26 |
| `hbridge_switch_logic_tb` | every level −13..13: gates equal the balanced-ternary digits; output rebuilt from gates; clear state |
| `dspwm27_top_tb` | see below |

`dspwm27_top_tb` runs the full-size design for two complete 60 Hz periods
(about 1.67 million clocks, roughly a second of simulation time). On every
clock it checks:

- the ROM address and the reference;
- the carrier;
- all 26 pulses against the previous clock's reference and carrier;
- that the level rebuilt from the gates equals the number of active pulses
  minus 13.

Averaged over each 3000-clock carrier period, the output level must follow
(reference − 4550)/350 within half a level. The largest deviation measured is
about 0.11 levels. The testbench also checks:

- that the measured reference period is 833,500 clocks;
- that every level −13..+13 occurs;
- that every state of every bridge occurs;
- that the carrier reaches its peak and trough.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/dspwm_pkg.sv tb/dspwm27_top_tb.sv --top-module dspwm27_top_tb -o sim
    ./obj_dir/sim

The same command works for every other testbench; change the file name and
`--top-module`.
