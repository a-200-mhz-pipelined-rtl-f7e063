# Pipelined 54 x 54-bit signed-digit multiplier

This is a 54 x 54-bit unsigned multiplier with eight pipeline stages. It
accepts one operand pair per clock and returns each product eight clocks
later. Its main idea is that the partial products are added in **redundant
radix-2 signed-digit (SD) arithmetic**. In that arithmetic a carry never
moves more than one digit to the left, so the delay of an adder does not
depend on the word length. Each level of the adder tree is therefore one
small cell deep and can be its own pipeline stage.

The circuit this RTL describes was built in multiple-valued current-mode
logic. In that logic a digit is a pair of complementary currents, addition
is done by joining wires, and each adder cell is a set of current threshold
detectors. The pipeline latches store only the binary outputs of those
detectors. The RTL keeps this structure and this timing in ordinary
synthesizable logic: every adder cell is split into a comparator half and a
current-source half, with the pipeline register between them. The analog
threshold detector itself exists as a behavioural model with real-valued
currents.

## Signed-digit addition: the part to understand first

A radix-2 SD number `X = sum x_i * 2^i` has digits `x_i` in {-1, 0, +1}.
Two such numbers A and B are added in three steps per digit:

1. `z_i = a_i + b_i`: the linear sum, in {-2..+2}.
2. `z_i = 2*c_i + w_i`: the sum is split into a carry `c_i` and an
   intermediate sum `w_i`, both in {-1, 0, +1}.
3. `s_i = w_i + c_{i-1}`: the final sum digit.

Step 3 could overflow (for example `w_i = 1` and `c_{i-1} = 1`). To prevent
that, step 2 picks between the two ways to write `z_i = +1` or `-1`, using a
flag `E_i = (z_{i-1} >= 1)` from the next digit to the right:

| z_i | E_i | c_i | w_i |
|-----|-----|-----|-----|
| +2  |  -  | +1  |  0  |
| +1  |  1  | +1  | -1  |
| +1  |  0  |  0  | +1  |
|  0  |  -  |  0  |  0  |
| -1  |  1  |  0  | -1  |
| -1  |  0  | -1  | +1  |
| -2  |  -  | -1  |  0  |

If `z_{i-1} >= 1`, then the carry `c_{i-1}` cannot be -1, so `w_i` is kept
at 0 or -1. Otherwise `c_{i-1}` cannot be +1, so `w_i` is kept at 0 or +1.
In both cases `s_i` stays in {-1, 0, +1}. Each digit depends only on the
digits at `i` and `i-1`, plus `E` from `i-2`, so the adder has no carry
chain.

How a cell finds `z_i`: four comparators test the five-valued sum against
the thresholds -1.5, -0.5, +0.5 and +1.5, which gives a 4-bit thermometer
code (`sd_pkg::td_code_t`). The switched current sources then turn that
code and `E_i` into `c_i` and `w_i`. The code bit for "z >= 1" is the `E`
that the cell sends to its left neighbour.

- `sdfa_cmp`: the comparators.
- `sdfa_csrc`: the current sources, following the table above.
- `sdfa`: the whole cell.
- `sd_adder`: a row of cells plus the wired sums `s_i = w_i + c_{i-1}`.

**Word width.** Every SD word in the multiplier has W = 2N = 108 digits. The
carry out of the top digit is discarded, so every sum is exact modulo 2^W.
The final product is below 2^(2N), so after the SD-to-binary conversion it
is exact. An intermediate SD word can have a different value from the true
partial sum; only its value modulo 2^W is meaningful.

**Digit coding in RTL.** A digit is a 2-bit two's-complement number
(`sd_pkg::sd_digit_t`). The pattern `2'b10` (-2) never occurs. The current
pair of the original circuit is `((d+1)*I0, (1-d)*I0)`.

## Latched adder cell and where the pipeline registers are

`lsdfa` is `sdfa` with a rising-edge register on the 4-bit comparator code,
placed between the comparators and the current sources. In the current-mode
circuit this register is eight pass gates, holding the four comparator
voltages and their complements. Binary voltages are easy to store, while a
multiple-valued current is not, so this is the cheapest place to cut the
pipeline.

As a consequence, a register stage of the tree does not end at a sum. The
combinational path of one stage is:

`stored code -> current sources -> wired sum s -> next stage's linear sum z -> comparators -> register`

`sd_adder_pipe` is a row of `lsdfa` cells. Its output `s` is valid one
cycle after `a` and `b` are sampled. The `E` that a cell receives comes
from its neighbour's stored code, so both refer to the same operands.

## The pipeline

| Cycle | Module | Work |
|-------|--------|------|
| 1 | `booth_encoder` | radix-4 modified Booth digits of `b`; `a` is delayed one cycle with them |
| 2 | `pp_generator` | 28 partial products `d_j * a * 4^j`, each a 108-digit SD word |
| 3 | `sd_adder_tree` stage 1 | four-input addition: 28 -> 7 |
| 4 | stage 2 | two-input: 7 -> 4 |
| 5 | stage 3 | two-input: 4 -> 2 |
| 6 | stage 4 | two-input: 2 -> 1 |
| 7 | `sd2bin_converter` | low 54 bits of (positive digits) - (negative digits), plus the borrow |
| 8 | `sd2bin_converter` | high 54 bits, using that borrow |

**Booth encoding.** The unsigned 54-bit multiplier is zero-extended and
recoded into N/2 + 1 = 28 digits in {-2..+2}. Each digit is coded as
`(neg, two, one)`. The top digit is never negative.

**Partial products in SD form.** The magnitude `a` or `2a` is placed at
digit `2j`. For a negative Booth digit, each 1 in the magnitude becomes a
-1 digit. So a negative partial product needs no two's-complement
increment and no sign extension: the redundant number system takes in the
negation for free.

**Tree.** Stage 1 adds four operands per group. Two combinational
`sd_adder` rows feed one latched `sd_adder_pipe` row. Stages 2 to 4 each
use one latched row per pair. The tree has room for 32 operands. At N = 54
it uses 28, and the unused ones are constant zero, which synthesis removes.

**SD to binary.** `S = P - M`, where P marks the +1 digits and M marks the
-1 digits. This is the only carry-propagating step. It is split into two
54-bit halves so that it spans two cycles.

## Interface and timing (`mvl_multiplier`)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock; everything is rising-edge |
| `rst_n` | in | 1 | synchronous, active low; clears only the valid chain |
| `in_valid` | in | 1 | `a`, `b` hold an operand pair |
| `a`, `b` | in | N | unsigned multiplicand and multiplier |
| `out_valid` | out | 1 | `p` holds a product |
| `p` | out | 2N | `a * b` |

Parameter: `N` (default 54). If `in_valid` is high in cycle t, then
`out_valid` and the product appear in cycle t + 8 (`sd_pkg::LATENCY`).
There is no stall and no back-pressure: a pair may be applied every cycle.
Datapath registers have no reset. Only the valid chain does, so outputs
before the first `out_valid` have no meaning. `N` may be set to any size
whose Booth digit count N/2 + 1 is 32 or less (N <= 62). The latency is
always 8.

## Current-mode behavioural models

These models are not synthesizable. They describe the analog cell whose
logic function the RTL uses. Currents are `real` values in units of the
unit current I0.

- `mvcm_threshold_detector`: the dual-rail threshold detector. Two
  comparators, `ix >= it` and `ix' > it'`, steer a source-coupled pair fed
  by one current source `IM`. The output is `iy = IM` or `0`, and
  `iy + iy' = IM` always holds. It has a fixed delay `TD`. In the real
  circuit the delay shrinks as `|ix - it|` grows.
- `mvcm_latched_threshold_detector`: the same detector with the comparator
  outputs held from one rising clock edge to the next. This is the storage
  that `lsdfa` models.
- `mvcm_sdfa`: the SD full adder cell at the current level. Each input
  digit arrives as a pair of complementary currents, ((d+1), (1-d)) I0.
  The two pairs are joined into the five-valued sum (0..4 I0). Four
  instances of the detector above compare it with 0.5, 1.5, 2.5 and
  3.5 I0. Switched currents then produce the carry pair and the
  intermediate-sum pair. Its test checks that it follows the same carry rule as
  `sdfa`, in current form (every input pair, both values of E).

## Files

- `rtl/sd_pkg.sv`: digit, sum, comparator-code and Booth-digit types;
  `booth_digits()`; `LATENCY`.
- `rtl/sdfa_cmp.sv`, `rtl/sdfa_csrc.sv`, `rtl/sdfa.sv`, `rtl/lsdfa.sv`:
  the adder cell, plain and latched.
- `rtl/sd_adder.sv`, `rtl/sd_adder_pipe.sv`: the adder rows.
- `rtl/booth_encoder.sv`, `rtl/pp_generator.sv`, `rtl/sd_adder_tree.sv`,
  `rtl/sd2bin_converter.sv`: the pipeline stages.
- `rtl/mvl_multiplier.sv`: the top.
- `rtl/mvcm_*.sv`: the behavioural models.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
  `tb/tb_mvl_multiplier_4x4.sv` tests the design built at N = 4.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops on its
own. It also has a watchdog that counts a failure if the test hangs. For
example, from the directory that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert -Wno-fatal rtl/sd_pkg.sv -y rtl \
    tb/tb_mvl_multiplier.sv --top-module tb_mvl_multiplier -Mdir obj_mul
./obj_mul/Vtb_mvl_multiplier
```

Replace `tb_mvl_multiplier` with any other `tb_*` name to run that test.
`sd_pkg.sv` must come first, because the modules import it.

What the tests establish:

- **`tb_mvl_multiplier`** runs at the default N = 54. It applies 1,500
  operand pairs (corner values, then random ones), mostly back to back with
  some idle cycles. It checks every product against a 108-bit reference and
  checks the exact 8-cycle latency. It also counts, and requires at least
  once, each of the following:
  - every Booth digit value;
  - all four choices of the carry rule (z = +1 and z = -1, each with E = 0
    and E = 1) in the last tree stage;
  - a borrow between the converter halves;
  - back-to-back issue.
- **`tb_mvl_multiplier_4x4`** covers all 256 products of the 4 x 4
  configuration.
- **The cell and row tests** check:
  - the carry rule exhaustively;
  - that the latched cell has exactly one cycle of latency;
  - the adder, partial-product and tree values modulo 2^W, against an
    independent binary reference;
  - the Booth recoding identity `sum d_j 4^j = b`;
  - the converter against a digit-by-digit sum.

Synthesis of the default top gives about 74,500 word-level cells and 7,375
flip-flop bits. Most of those bits hold the partial products and the
comparator codes of the tree. Digits that are always zero are trimmed.

## Choices made here, and where this design departs from the original

- **Operands are unsigned.** The original does not state the operand
  format. With unsigned operands, 28 Booth digits fill the four-input first
  stage exactly (7 groups).
- **Structure of the four-input first stage.** The original gives only the
  split "four inputs in the first stage, two in each later stage". Here
  stage 1 is two combinational SD adder rows followed by a latched row. Its
  logic path is therefore about one adder cell longer than in stages 2–4,
  where one cell makes up a stage.
- **Partial products in SD form.** The original says only that the Booth
  encoder, the partial-product generator and the converter are conventional
  binary logic. It leaves the partial-product format and the interface into
  the current-mode tree open. Here the interface is plain wires, because
  both sides use the same digit coding.
- **Converter.** The split into two 54-bit halves with a borrow is this
  design's own. The original gives only the two-cycle latency.
- **Storage.** The pass-gate latches (one clock phase, dynamic storage) are
  modelled as rising-edge registers. The clocking of the original pass
  gates is not specified.
- **Valid chain and reset** are additions; the original has neither.
- **Not modelled:**
  - the circuit-level properties: 200 MHz at 1.5 V, 1.0 W, 4.6 ns L-SDFA
    delay;
  - the analog parts that have no logic function: current sources, PMOS
    current mirrors, and summation by wiring.
