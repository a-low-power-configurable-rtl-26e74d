# Carry-maskable adder: a ripple carry adder with run-time accuracy control

Many workloads, such as image filtering, can tolerate small errors in their additions. A
carry-maskable adder (CMA) lets the user trade accuracy for switching activity and carry-chain
delay at run time. It is a plain ripple carry adder in which any lower run of bit positions can be
switched into an approximate mode. In that mode each position outputs `a OR b` and produces no
carry. The switch is a carry mask signal, one bit per group of positions. The adder needs no
multiplexers, no carry prediction logic and no error correction. The only change from an ordinary
ripple carry adder is that, in every cell, one 2-input NAND gate becomes a 3-input NAND gate.

The RTL here describes the 16-bit adder made of four 4-bit sub adder units. Units 0, 1 and 2 each
have a mask bit. Unit 3, the most significant, is always exact.

## The masking cell

An XOR can be built from NAND, OR and AND gates:

    u = NAND(a, b)      w = OR(a, b)      a XOR b = AND(u, w)

`NOT(u)` is `a AND b`, so the same NAND also gives the carry of a half adder. Give the NAND a
third input, `mask_x`:

    u = NAND(a, b, mask_x)

| mask_x | u           | sum `AND(u,w)` | carry `NOT(u)` |
|--------|-------------|----------------|----------------|
| 1      | NAND(a, b)  | a XOR b        | a AND b        |
| 0      | 1           | a OR b         | 0              |

This cell is the carry-maskable half adder (`cmha`). In the masked mode its sum is wrong only when
`a = b = 1`, and it creates no carry.

The carry-maskable full adder (`cmfa`) has two stages. First comes this maskable half adder on `a`
and `b`. Then an ordinary half adder, of the same NAND/OR/AND form, adds the carry in to the
partial sum. The carry out is the OR of the two stage carries. Its behaviour:

| mask_x | cin | result                              |
|--------|-----|-------------------------------------|
| 1      | x   | `{cout, s} = a + b + cin` (exact)   |
| 0      | 0   | `s = a OR b`, `cout = 0` (masked)   |
| 0      | 1   | `{cout, s} = (a OR b) + 1`          |

A cell is masked only when its mask bit is 0 **and** its carry in is 0. The last row is therefore
not a masked state: the cell still passes a carry on. That row follows from the two-stage structure
chosen here. What really matters for use is the rule in the next section.

## Sub adder units and the mask word

Each position could have its own mask bit. To keep the control small, positions are instead
grouped into sub adder units (`cma_unit`). Each unit is a short ripple chain whose cells share one
mask bit. Unit 0 starts with a `cmha`, because bit 0 has no carry in. All its other cells, and all
cells of the other units, are `cmfa`s. The adder (`cma`) chains the units: the carry out of unit
`k` is the carry in of unit `k+1`.

    mask_x[0] -> unit 0 (bits  3..0)   CMHA + 3 CMFA
    mask_x[1] -> unit 1 (bits  7..4)   4 CMFA
    mask_x[2] -> unit 2 (bits 11..8)   4 CMFA
    (always 1) unit 3 (bits 15..12)    4 CMFA, exact
    s[16] = carry out of unit 3

**Masks must be thermometer codes.** The masked units must form a run at the bottom: zeros in the
low mask bits, ones above them. Masking a unit that takes a carry from an exact unit below it does
not stop that carry (third table row). The adder accepts any mask and computes the result as just
described. But such a mask gives none of the savings, and its error is not the simple one given
below.

### Accuracy settings

| setting | `mask_x` | approximate low bits | exact bits |
|---------|----------|----------------------|------------|
| CMA1    | `000`    | 12                   | 15..12     |
| CMA2    | `100`    | 8                    | 15..8      |
| CMA3    | `110`    | 4                    | 15..4      |
| CMA4    | `111`    | 0                    | all        |

`cma_pkg::cma_setting_mask()` turns a `cma_setting_e` value into this mask.

### What the error is

With a thermometer mask that leaves `k` low bits approximate, the low part is `(a OR b)` with no
carry out, and the high part is added exactly with a carry in of 0. Since
`a + b = (a OR b) + (a AND b)` bit-field by bit-field, the result is

    exact_sum - s = (a AND b) restricted to bits k-1..0

The result is never larger than the exact sum. The error is at most `2^k - 1`. It is zero exactly
when no low bit position has both operand bits set. For uniformly random operands this gives a mean
error distance of `(2^k - 1)/4` and an error rate of `1 - (3/4)^k`:

| setting | mean error | error rate | mean relative error (1M random pairs, simulated) |
|---------|-----------:|-----------:|-----------------------------------------------:|
| CMA1    | 1023.75    | 96.8 %     | 2.03e-2                                        |
| CMA2    | 63.75      | 90.0 %     | 1.34e-3                                        |
| CMA3    | 3.75       | 68.4 %     | 7.9e-5                                         |
| CMA4    | 0          | 0          | 0                                              |

Published evaluations of this adder report slightly smaller errors for CMA1 and CMA2: mean errors
1012.6 and 58.4, error rates 95.9 % and 88.4 %, relative errors 1.95e-2 and 1.04e-3. For CMA3 they
report the same values. The RTL gives the closed form above, and its input distribution is exactly
uniform. The gap most likely comes from the input set used for those evaluations.

Power and delay scale with the number of exact bits. In a masked unit nothing toggles on the carry
path. The longest active carry chain starts at the lowest unmasked unit.

## Parameters and ports (`cma`)

| parameter   | default | meaning                                                        |
|-------------|---------|----------------------------------------------------------------|
| `N`         | 16      | operand width                                                  |
| `UNIT_W`    | 4       | bits per sub adder unit; `N` must be a multiple of it          |
| `MASK_LAST` | 0       | 1 gives the top unit a mask bit too                            |

| port     | dir | width                              | meaning                                   |
|----------|-----|------------------------------------|-------------------------------------------|
| `a`, `b` | in  | `N`                                | unsigned operands                         |
| `mask_x` | in  | `N/UNIT_W - 1` (`N/UNIT_W` if `MASK_LAST`) | bit k: 1 = unit k exact, 0 = masked |
| `s`      | out | `N+1`                              | sum, `s[N]` = final carry                 |

The adder is purely combinational. It has no clock, no reset and no pipeline registers. A result
is valid one carry-chain delay after the inputs settle. Put it between registers as the
surrounding design needs.

`UNIT_W = 1, MASK_LAST = 1` gives the finest form: one mask bit per bit position. For example,
`cma #(.N(8), .UNIT_W(1), .MASK_LAST(1))` is an 8-bit adder with an 8-bit mask.

## Files

| file               | contents                                                     |
|--------------------|--------------------------------------------------------------|
| `rtl/cma_pkg.sv`   | default geometry, mask type, accuracy-setting enum and mask function |
| `rtl/cmha.sv`      | carry-maskable half adder                                    |
| `rtl/cmfa.sv`      | carry-maskable full adder                                    |
| `rtl/cma_unit.sv`  | sub adder unit (`W` cells, one mask bit)                     |
| `rtl/cma.sv`       | the adder (top)                                              |
| `tb/tb_cmha.sv`, `tb/tb_cmfa.sv` | exhaustive cell tests                          |
| `tb/tb_cma_unit.sv`| exhaustive test of a 4-bit unit, bottom and middle variants  |
| `tb/tb_cma.sv`     | end-to-end test of the 16-bit default adder, all 8 masks     |
| `tb/tb_cma_bitwise.sv` | 8-bit adder with one mask bit per position: exhaustive for all thermometer masks, random otherwise |
| `tb/tb_cma_accuracy.sv` | mean error, mean relative error and error rate over one million random pairs per setting |

The cells are written as the gate equations above. A synthesis tool is free to restructure them.
To keep the gate structure in a real implementation, map the cells to library gates by hand or
mark them as do-not-touch.

## Simulating

Every testbench checks its own results. It prints `TB_RESULT checks=N failures=M` and stops, and it
has a time-out that counts as a failure. With Verilator 5:

    verilator --binary --timing --assert -Irtl \
        rtl/cma_pkg.sv rtl/cmha.sv rtl/cmfa.sv rtl/cma_unit.sv rtl/cma.sv \
        tb/tb_cma.sv --top-module tb_cma -Mdir obj_tb_cma
    ./obj_tb_cma/Vtb_cma

To run another test, replace `tb_cma` with its name. Each one takes under a second.

`tb_cma` compares every sum with a unit-by-unit reference model. A masked unit adds
`(a OR b) + carry` and an exact one adds `a + b + carry`. For the four settings the test also
checks the closed-form error. It counts how often each behaviour occurs, and it fails if any never
occurs: a masked carry, an approximate sum, a carry out of the top, and a carry entering a masked
unit.

## Choices made in this RTL

- The internal gates of the second half adder in `cmfa` are this design's own choice. So is the
  resulting behaviour of a masked cell that receives a carry. The published description defines
  only the masked cell with carry in 0, and the exact cell.
- The always-exact top unit is built from `cmfa` cells with their mask tied to 1, not from plain
  full adders. The logic is the same, and synthesis removes the constant input.
- All units have the same width. The scheme also allows units of different lengths. Shorter units
  give finer accuracy steps.
- Non-thermometer masks are accepted and not flagged.
- Operands are unsigned.

## Not included

Nothing here models the power, delay or area of the adder. The approximate image sharpening
application used to judge it is not included either: its filter kernel is not specified. The
conventional ripple carry, carry look-ahead and gracefully-degrading adders that this adder is
usually compared with are not part of the design.
