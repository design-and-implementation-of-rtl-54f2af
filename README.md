# Low-power FIR filter with a shared hybrid-encoded multiplier block

An L-tap FIR filter, y(n) = Σ h[k]·x(n−k), whose cost is dominated by its
constant multiplications. This design attacks that cost in two ways:

1. **Fewer multipliers.** The filter is built in transposed direct form, where
   every tap multiplies the *same* input sample by its own constant. All those
   products come from one shared *multiplier block*, and coefficients that are
   equal up to sign and a power of two share one multiplier (a form of common
   subexpression elimination).
2. **Fewer partial products per multiplier.** Each remaining multiplier is a
   *hybrid encoded* multiplier: it looks at its multiplier operand and uses
   plain binary shift-and-add when the operand has few 1 bits, radix-4 Booth
   recoding otherwise, so it never sums more partial products than Booth and
   often fewer. Unused partial-product rows are held at zero and do not
   toggle.

With the default 50-tap coefficient set, 13 multipliers serve all 50 taps.

## Data path

```
            in_valid                               shared multiplier block
x_in ──►[ x_q ]──────────────┬───────────────────────────────────────────────┐
        loads only on        │  one hybrid multiplier per distinct odd       │
        in_valid             │  fundamental; taps take  ±(product << s)      │
                             ▼                                               ▼
                      x·h[0]   x·h[1]        x·h[L-2]            x·h[L-1]
                        │        │              │                    │
 y_out ◄─[reg]◄──(+)◄─[z1]◄─(+)◄─[z2] … ◄─(+)◄─[z L-1]◄─────────────(+)◄── 0
```

* `x_q` — input register. It only loads when `in_valid` is high, so between
  samples the multiplier block sees a steady operand and does not switch.
* `cse_multiplier_block` — all L products from `x_q`, combinational.
* `z[1..L-1]` — partial-sum registers of the transposed form:
  `z[k] <= x·h[k] + z[k+1]`, `y <= x·h[0] + z[1]`. Each register is fed by a
  single adder, so the clock period is one product plus one adder, whatever L.

All registers, including the partial sums, only advance on a valid sample, so
idle cycles are a clean stall.

## Hybrid encoding (`hybrid_encoder`, `hybrid_multiplier`)

A product a·b is a sum of shifted copies of a, one per "digit" of b. The
encoder forms two recodings of the B_W-bit two's-complement operand b in
parallel:

* **binary** — one term `+a<<i` for every 1 bit i; the sign bit gives
  `−a<<(B_W−1)`. Term count = number of 1 bits (0 … B_W).
* **radix-4 Booth** — digit j ∈ {−2,−1,0,1,2} from bits (2j+1, 2j, 2j−1);
  each non-zero digit gives `±a<<2j` or `±a<<(2j+1)`. Term count ≤ B_W/2.

It then takes binary if it has no more terms than Booth (ties go to binary),
otherwise Booth, and packs the chosen terms in order of weight into B_W/2
slots `{valid, neg, shift}`. Since Booth never needs more than B_W/2 terms and
binary is only taken when it is no longer, B_W/2 slots always suffice.

Examples for 16-bit b:

| b      | bits                 | 1 bits | Booth digits        | chosen | terms |
|--------|----------------------|--------|---------------------|--------|-------|
| 5      | 0000 0000 0000 0101  | 2      | +1, +1              | binary | 2     |
| 7      | 0000 0000 0000 0111  | 3      | −1, +2              | Booth  | 2     |
| 0x00FF | 0000 0000 1111 1111  | 8      | −1, 0, 0, 0, +1     | Booth  | 2     |
| 0x4001 | 0100 0000 0000 0001  | 2      | +1, …, +1           | binary | 2     |

The multiplier turns each slot into a row: `a<<shift` for an added term,
`~(a<<shift)` plus a carry-in bit for a subtracted term, and all zeros for an
empty slot. Rows and carry bits are added. An immediate assertion checks that
the term count equals the count of the recoding chosen.

In the filter the multiplier operand b is a constant (a coefficient
fundamental), so the mode and the term list are fixed per multiplier and a
synthesis tool folds the encoder away, leaving only the adders of the terms
actually used. As a general two-operand multiplier (its own testbench drives
b freely) the selection is done at run time.

## Sharing in the multiplier block (`cse_multiplier_block`)

At elaboration each coefficient is written as
h[k] = sign · fund · 2^shift with `fund` odd. One hybrid multiplier is built
per distinct non-zero `fund`, owned by the lowest tap that has it; every tap
takes `±(x·fund) <<< shift` from its owner. This catches:

* the mirror taps of a linear-phase (symmetric) filter,
* coefficients of opposite sign,
* coefficients that differ by a power of two,
* zero coefficients, which cost nothing.

The localparam `NUM_MULTS` gives the number of multipliers built. Sharing is
decided per whole coefficient; subexpressions inside coefficients (shared
digit patterns such as `x + x<<2` appearing in several coefficients) are not
extracted. A full divisor-extraction CSE pass would reduce the adders further.

## Interface and timing (`fir_top`)

| port       | dir | width  | meaning                                     |
|------------|-----|--------|---------------------------------------------|
| clk        | in  | 1      | clock, all registers on its rising edge     |
| rst_n      | in  | 1      | synchronous, active low; clears the history |
| in_valid   | in  | 1      | `x_in` carries a new sample                 |
| x_in       | in  | DATA_W | input sample, two's complement              |
| out_valid  | out | 1      | `y_out` carries a new output                |
| y_out      | out | OUT_W  | filter output, full precision               |

A sample accepted at rising edge t produces its output, with `out_valid`, at
rising edge t+2 (two cycles of latency). One sample per cycle can be accepted;
gaps in `in_valid` are passed through as gaps in `out_valid`. The output is
full precision: no rounding, no saturation, no overflow.

## Parameters

| parameter  | default                         | note                                  |
|------------|---------------------------------|---------------------------------------|
| TAPS       | 50                              | filter length L                       |
| DATA_W     | 16                              | input sample width                    |
| COEF_W     | 16                              | coefficient width, must be even       |
| COEF_SCALE | 1024                            | scale of the default coefficients     |
| COEFFS     | h[k] = min(k+1, L−k)·COEF_SCALE | packed, tap k in bits [k·COEF_W +: COEF_W] |
| OUT_W      | DATA_W+COEF_W+⌈log2 L⌉ = 38     | output width                          |

The default coefficient set is a symmetric triangular (Bartlett) low-pass
window. It is only a placeholder with a lot of sharing (13 multipliers for 50
taps); pass real coefficients through `COEFFS`. Any signed COEF_W-bit values
work, including the most negative one. The design was exercised at 10, 20, 30,
40 and 50 taps. A shorter filter can also run on the 50-tap instance by padding
`COEFFS` with zeros: zero taps add nothing and build no multiplier.

## How this relates to the original design

Followed: the transposed direct form with a multiplier block in place of a
multiplier per constant; constant multiplication by shifts and additions with
common terms shared; a hybrid multiplier that sets its partial products by the
number and position of the 1 bits of its multiplier operand and needs fewer
of them than Booth recoding; tap counts of 10 to 50.

This implementation's own choices, where the original gives no detail:

* the concrete hybrid rule (binary vs. radix-4 Booth, whichever is shorter,
  ties to binary) and the packing into B_W/2 zero-gated slots;
* sharing at the level of odd fundamentals instead of an iterative
  divisor-extraction search;
* 16-bit samples and coefficients, the default coefficients, the valid
  handshake, the input register, the two-cycle latency, synchronous reset and
  the full-precision output.

The array and Booth multipliers the hybrid multiplier is compared against are
not part of this design.

## Files

| file                          | content                                             |
|-------------------------------|-----------------------------------------------------|
| rtl/fir_pkg.sv                | term struct, mode enum, coefficient helper functions |
| rtl/hybrid_encoder.sv         | binary / Booth recoding and selection               |
| rtl/hybrid_multiplier.sv      | partial-product rows and their sum                  |
| rtl/cse_multiplier_block.sv   | shared multipliers for all taps                     |
| rtl/fir_top.sv                | the filter                                          |
| tb/tb_hybrid_encoder.sv       | all 65 536 16-bit operands, plus a 6-bit instance   |
| tb/tb_hybrid_multiplier.sv    | corners and 20 000 random 16×16 pairs; 6×6 exhaustive |
| tb/tb_cse_multiplier_block.sv | 12-tap set covering every sharing case; default set |
| tb/tb_fir_top.sv              | default 50-tap filter end to end                     |
| tb/tb_fir_tap_sweep.sv, tb/fir_tap_checker.sv | 10/20/30/40/50-tap filters    |

Every testbench checks against values it computes itself (products by the
simulator's own multiplication, outputs by a reference convolution over the
accepted samples), and ends with a line
`TB_RESULT checks=N failures=M`. `tb_fir_top` also checks the two-cycle
latency of every output, the impulse response, a full-scale negative step
(the largest output magnitude), stalls and a reset in mid-stream, and that
both binary- and Booth-mode multipliers and coefficient sharing occur.

## Simulating

With Verilator 5 (two-state simulation, so everything read is reset):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_fir_top rtl/fir_pkg.sv tb/tb_fir_top.sv
./obj_dir/Vtb_fir_top
```

Replace `tb_fir_top` with any other testbench name. Each runs in well under a
second. Lint with `verilator --lint-only -Wall -Irtl -y rtl rtl/fir_pkg.sv
rtl/fir_top.sv`; the only warnings are the unused observation outputs of the
multipliers inside the block.
