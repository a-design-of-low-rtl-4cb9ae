# FIR filter built from adders: shift-add multipliers and a modified carry save accumulator

This is a small direct-form FIR filter,

    y(t) = h(0)·x(t) + h(1)·x(t-1) + ... + h(TAPS-1)·x(t-TAPS+1)

in which every arithmetic operation is done by adders. There are no multiplier
cells. Each tap multiplies its sample by its coefficient with a shift-and-add array
of ripple carry adders. The tap products are then summed by a *modified carry save
accumulator*. Carry save rows of full adders first reduce the products to one sum
vector and one carry vector, with no carry travelling along a row. A carry select
adder made of ripple carry adders then adds those two vectors once. The goal is a
filter with little area and a short critical path.

By default the filter has 4 taps, 8-bit unsigned samples and coefficients, 8-bit
tap products and a 10-bit output. All four sizes are parameters.

## Block structure

```
            data_in ──┬───────────────► coefficient_register ── h(0..3) ──┐
                      │                       ▲ coef_load (one-hot)        │
 coeff_en, sample_en ─┼──► control_unit ──────┘                            ▼
                      │          │ sample_shift              shift_add_multiplier ×TAPS
                      └──► sample_register ── x(t-0..3) ──────────────────►│
                                 │ prod_en, out_en                         ▼ prod
                                 └───────────────────────────► mcsa_accumulator
                                                                 product DFFs
                                                                 carry_save_adder rows
                                                                 mcsa_adder (RCAin, RCA0/RCA1 + mux)
                                                                 output_dff ──► data_out
```

| module | role |
|---|---|
| `fir_mcsa_top` | the filter; wires the blocks below |
| `control_unit` | coefficient load index, sample enable, pipeline enables, `data_valid` |
| `coefficient_register` | TAPS coefficients, written one at a time from `data_in` |
| `sample_register` | tapped delay line, `taps[k] = x(t-k)` |
| `shift_add_multiplier` | one per tap; product from aligned additions |
| `mcsa_accumulator` | product register, carry save reduction, final adder, output register |
| `carry_save_adder` | one 3:2 row of full adders |
| `mcsa_adder` | carry select adder built from ripple carry adders |
| `rca` | ripple carry adder, 4 bits by default |
| `full_adder` | one-bit full adder (generate/propagate form) |
| `output_dff` | output register with enable |
| `fir_pkg` | default sizes |

## The modified carry save accumulator

This is the part that is least like a textbook FIR filter. It has three stages.

**1. Product register.** On the edge after a sample is taken (`prod_en`), the TAPS
products are stored in a row of D flip-flops. Two things follow. The adder tree
starts from registered values. And the multipliers and the accumulation sit in
different clock cycles.

**2. Carry save reduction.** The registered products are widened to `OUT_W` bits.
Products 0 and 1 form the first pair (sum vector, carry vector). Each further
product k goes through one `carry_save_adder` row together with the running pair.
A row is OUT_W independent full adders. Bit i produces a sum bit at weight 2^i and
a carry bit at weight 2^(i+1). The row therefore takes one full-adder delay,
however wide it is. The carry leaving the top bit is dropped, so the accumulator
works modulo 2^OUT_W. With TAPS products there are TAPS-2 rows, applied one after
another.

**3. Carry select final adder (`mcsa_adder`).** The sum and carry vectors are
added once, using blocks of `BLOCK` = 4 bits:

* The lowest block is a ripple carry adder that receives the real carry in
  (`RCAin`).
* Each higher block is computed twice at the same time: once by a ripple carry
  adder with carry in 0 (`RCA0`) and once by one with carry in 1 (`RCA1`).
  When the carry from the block below arrives, a multiplexer picks the right sum
  and carry out.

At 8 bits this is exactly one `RCAin` block and one selected block. The
accumulator uses it at 10 bits: blocks of 4, 4 and 2 bits. In the top two blocks
the carry passes through one multiplexer each, not through four full adders.

The result goes into `output_dff` on the edge after the product register
(`out_en`).

## Multiplication by shifting and adding

`shift_add_multiplier` holds a running partial product. For each coefficient bit
i, from bit 0 up, one `PROD_W`-bit ripple carry adder adds `x << i` if `h[i]` is 1,
and 0 otherwise. The result is `(x·h) mod 2^PROD_W`. With `PROD_W = DATA_W + COEF_W`
it is exact. This array is the simplest one that builds a multiplier from aligned
additions. It has COEF_W adders in series, so it sets the combinational path
between the sample register and the product register.

## Loading coefficients and feeding samples

Coefficients and samples share the `data_in` bus. All control is synchronous to
the rising edge of `clk`. `rst` is synchronous and active high, and it clears
every register.

* **Coefficient load.** While `coeff_en` is high, each cycle writes `data_in`
  into the coefficient at the control unit's index, which then advances. Index 0
  is `h(0)`, the weight of the newest sample. The index wraps from TAPS-1 back to 0, so a
  complete set of TAPS loads leaves it at 0 and the next reload starts again at
  `h(0)`. Reset also sets the index to 0.
* **Sample.** While `sample_en` is high and `coeff_en` is low, `data_in` is shifted
  into the delay line. One sample can be taken every cycle.
* **Both enables high.** The coefficient load wins, and the sample is dropped.
* **Timing.** Suppose a sample is taken at edge n. Its products are registered at
  edge n+1. `data_out` shows y at edge n+2. `data_valid` is high for the cycle
  that follows edge n+2. Between samples `data_out` holds its value.
* **Changing coefficients while streaming.** A coefficient written at edge n+1 or
  later does not affect the output of a sample taken at edge n.

## Widths and arithmetic

All values are unsigned. Products keep their low `PROD_W` bits, and the sum keeps
its low `OUT_W` bits.

The defaults (8-bit data, 8-bit products, 10-bit output) follow the reference
waveforms of the design. With these defaults a product wraps as soon as
`x·h ≥ 256`, so the default filter is exact only for small coefficient/sample
products. The 10-bit sum of four 8-bit products can never overflow.

For an exact filter, set `PROD_W = 2·DATA_W` and make `OUT_W` at least
`clog2(TAPS·(2^DATA_W − 1)² + 1)`. For example, 4 taps of 8-bit data need
`PROD_W = 16, OUT_W = 18`, and 9 taps need `PROD_W = 16, OUT_W = 20`.

## How far it follows the original design, and where it departs

These parts follow the original design:

* the block split: coefficient register, sample register, control unit,
  multiplier, carry save accumulator with ripple carry adders, output D flip-flop;
* the 4-tap, 8/8/10-bit sizes;
* the 4-bit ripple carry adder with generate/propagate terms;
* the carry select structure of the final adder: an RCA with carry in 0, an RCA
  with carry in 1, a multiplexer, and an RCA for the low block;
* registering the products before the adders.

These are this implementation's own choices:

* **Load and handshake.** The coefficient load order and index counter, the
  priority of `coeff_en` over `sample_en`, the synchronous reset, and the
  `data_valid` output.
* **Latency.** The two-edge latency: product register plus output register.
* **Multiplier array.** The exact layout of the shift-add array.
* **Reduction order.** The order of the carry save rows, and chaining the carry
  select blocks beyond 8 bits.
* **Width reduction.** Cutting the products and the sum to their low bits. The
  original widths are known, but not how values are reduced to them.
* **Signedness.** Unsigned arithmetic throughout.

These are known differences:

* **Loadable coefficients.** The original implementation seems to use fixed
  coefficients. Its filter shows only input, clock, reset and output pins, and
  about 30 flip-flops. This design keeps loadable coefficients and a product
  register, so it has 111 flip-flop bits and 23 port bits at the defaults.
* **Timing and power.** No timing or power figure of the original has been
  reproduced.

The baseline multipliers that the design was compared against are not part of
this design and are not included: a Booth recoding multiplier and a floating-point
Dadda multiplier.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

* `tb_full_adder`, `tb_rca`, `tb_mcsa_adder`, `tb_shift_add_multiplier` test
  exhaustively at their default sizes. The 8-bit carry select adder gets all
  2^17 input combinations, and the 8×8 multiplier all 65536 operand pairs. Each
  also has a random test of a wider instance.
* `tb_carry_save_adder` checks the modular sum and also each bit, to show that no
  carry moves along a row.
* `tb_mcsa_accumulator` checks the two-edge latency, the hold behaviour, and the
  sum at 4 and at 9 products.
* `tb_fir_mcsa_top` runs the filter at its default parameters against a
  cycle-accurate model. It drives an impulse (the output replays the
  coefficients), a step, back-to-back samples, idle cycles, coefficient reloads
  mid-stream, both enables at once, and resets. It counts each of these, and it
  fails if one never happens.
* `tb_fir_triangle9` runs a 9-tap triangular filter, h = a·(1,2,3,4,5,4,3,2,1),
  at exact widths. It checks the impulse response, the DC gain 25·a, and 500
  random samples against direct convolution.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/fir_pkg.sv tb/tb_fir_mcsa_top.sv \
          --top-module tb_fir_mcsa_top -Mdir obj && ./obj/Vtb_fir_mcsa_top
```

`-Irtl` lets Verilator find each module in `rtl/<module>.sv`. Any testbench in
`tb/` runs the same way. Each one finishes in well under a second.

## Changing it

* **Number of taps and widths.** Set `TAPS`, `DATA_W`, `PROD_W` and `OUT_W` on
  `fir_mcsa_top`. Coefficients have the width of `data_in`.
* **Carry select block width.** `fir_pkg::BLOCK_W`. The top block may be narrower
  than the others.
* **Carry into the final adder.** The carry input of `mcsa_adder` is tied to 0 in
  the accumulator. Use it to add a rounding constant.
