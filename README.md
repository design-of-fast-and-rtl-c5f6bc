# Pre-encoded NR8SD multiplier

In filters, transforms and other DSP kernels, one operand of most multiplications
is a constant coefficient known at design time. A pre-encoded multiplier takes
advantage of that. The coefficients are recoded once, ahead of time, into the
digit form the partial-product generators want, and stored that way in a ROM.
The multiplier then needs no recoding logic of its own.

This design recodes the coefficients in radix 8, using a **non-redundant radix-8
signed-digit (NR8SD)** form:

- Each group of three coefficient bits becomes one digit, so a 24-bit
  coefficient yields 8 partial products. Radix-4 Booth needs 12.
- Each digit has exactly eight possible values, so it is stored in exactly
  three bits, the same as plain binary.
- Only the top digit, which has to carry the two's complement sign, is kept in
  radix-8 Booth form.

The RTL is written in SystemVerilog and is parameterised in the operand width,
the ROM depth, the coefficient set and the digit form.

## Digit forms

A digit is worth `group + carry_in - 8*carry_out`. Here `group` is the 3-bit
slice of the coefficient (0..7), and the carry runs from the low digits up.
Two forms exist. They differ only in where a digit wraps round:

| form          | digit set    | carry out when `group+carry_in` is | stored bits `{n2,n1,n0}` mean |
|---------------|--------------|------------------------------------|-------------------------------|
| `NR8SD_MINUS` | -4 .. +3     | >= 4                               | `-4*n2 + 2*n1 + n0`           |
| `NR8SD_PLUS`  | -3 .. +4     | >= 5                               | `+4*n2 - 2*n1 - n0`           |

Both forms are built from a chain of half adders. A normal half adder `HA` gives
`c = p&q`, `s = p^q` and `2c + s = p + q`. A "negative" half adder `HA*` gives
`c = p|q`, `s = p^q` and `2c - s = p + q`, so its sum bit counts negatively:

- `NR8SD_MINUS` uses `HA, HA, HA*` on bits 0, 1, 2.
- `NR8SD_PLUS` uses `HA*, HA*, HA`.

The cell is `nr8sd_digit_enc`. The HA/HA* construction, and the split between a
"minus" and a "plus" form, come from the radix-4 NR4SD scheme that this design
extends.

The top digit is encoded by `booth8_msb_enc`. It uses the radix-8 Booth table,
with the chain's carry in the place of the bit below the group:
`-4*b2 + 2*b1 + b0 + c`, a value in -4..+4. That covers the sign of the
coefficient. If N is not a multiple of three, the coefficient is sign-extended
to `3*K` bits, where `K = ceil(N/3)`.

Worked example (`NR8SD_PLUS`, N = 6, B = 0b011_101 = 29):

- Digit 0: group 5 + carry 0 = 5. This is above +4, so the digit is 5 - 8 = -3
  and the carry is 1.
- Digit 1 (Booth): -4·0 + 2·1 + 1 + 1 = +4.

Check: 4·8 - 3 = 29.

## Stored word

`nr8sd_pkg` defines the layout. With K digits, the word is `ENC_W = 3*(K-1) + 5`
bits wide:

```
enc[3j+2:3j]        {n2,n1,n0} of digit j, j = 0..K-2
enc[ENC_W-1:3K-3]   top digit as pp_sel_t {neg, x4, x3, x2, x1}
```

For N = 24 that is 26 bits per coefficient, against 24 bits for plain two's
complement. The top digit is stored as Booth select signals, not as three bits,
because it can take nine values. Its sign bit is left clear when the digit is
zero, so a zero digit causes no sign toggling.

## Datapath

`nr8sd_multiplier` is purely combinational and computes `p = a * B`:

1. **Digit decode** (`nr8sd_digit_dec`). Each stored digit becomes a sign and a
   one-hot magnitude. The magnitude is `2*n1+n0` when `n2 = 0` and
   `4-(2*n1+n0)` when `n2 = 1`. This rule is the same in both forms; only the
   sign rule differs:
   - minus form: `neg = n2`
   - plus form: `neg = ~n2 & (n1|n0)`

   The top digit is already in select form.
2. **Hard multiple** (`triple_gen`). The multiple 3A is the one multiple that is
   not a shift of A. It is formed once, as A + 2A, and shared by all rows.
3. **Partial products** (`nr8sd_ppg`). Each row is an AND-OR choice of A, 2A, 3A
   or 4A, XORed with the digit's sign. The row is `N+2` bits wide, the least
   width that holds ±4A. The "+1" that completes a negation is returned as
   `cin`.
4. **Sign handling without sign extension.** The top bit of each row is
   inverted. A constant row `COR = -Σ_j 2^(N+1)·8^j (mod 2^2N)` then makes up
   the difference. All the `cin` bits fit in one more row, since they sit at
   weights `8^j` and never share a column. This gives K + 2 rows in total, all
   of them non-negative bit vectors.
5. **Carry-save tree** (`csa_tree`, built from `csa32`). At each level the rows
   go three at a time into 3:2 compressors, and leftover rows pass through, down
   to a sum row and a carry row. With 10 rows (N = 24) it takes 5 levels.
6. **Final adder** (`cla_adder`). A Kogge-Stone parallel-prefix carry
   look-ahead adder, 2N bits wide.

## System and timing

`nr8sd_premult_system` is the top level. It wires `nr8sd_coeff_rom` to
`nr8sd_multiplier`.

| port        | dir | width         | meaning                                   |
|-------------|-----|---------------|-------------------------------------------|
| `clk`       | in  | 1             | clock                                     |
| `rst_n`     | in  | 1             | synchronous active-low reset              |
| `in_valid`  | in  | 1             | `a` and `coef_addr` are valid this clock  |
| `a`         | in  | N             | multiplicand, two's complement            |
| `coef_addr` | in  | clog2(DEPTH)  | index of the coefficient                  |
| `out_valid` | out | 1             | `p` holds a new product                   |
| `p`         | out | 2N            | `a * COEFFS[coef_addr]`, two's complement |

The design runs as a two-stage pipeline:

- **Edge 1:** the ROM reads the addressed coefficient. The operand `a` is
  registered at the same edge.
- **Edge 2:** the product is registered after the whole multiplier.

A pair offered with `in_valid` appears on `p` with `out_valid` two clocks later.
The system takes one new pair every clock. There is no back-pressure.

The ROM contents are built during elaboration. The `nr8sd_coeff_rom` module
instantiates one `nr8sd_encoder` per entry, on the constant coefficient, so
synthesis folds the encoders into a table. Its read enable is tied to
`in_valid`.

## Parameters

| parameter | default                | notes                                                        |
|-----------|------------------------|--------------------------------------------------------------|
| `N`       | 24                     | operand width; K = ceil(N/3) partial products (8 at N = 24)  |
| `DEPTH`   | 16                     | number of coefficients, 2..64                                |
| `FORM`    | `NR8SD_PLUS`           | or `NR8SD_MINUS`                                             |
| `COEFFS`  | `default_coeffs(N)`    | `coef_table_t`, entry e in bits `[e][N-1:0]`, N up to 64     |

The default coefficient set is chosen to exercise the design:

- entry 0 is 0;
- entry 1 is -2^(N-1);
- entry 2 is 2^(N-1)-1;
- entry 3 is -1;
- the remaining entries are the top N bits of `e * 0x9E3779B97F4A7C15`.

For a real filter, pass your own table through `COEFFS`.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| testbench                  | what it shows                                                                 |
|----------------------------|-------------------------------------------------------------------------------|
| `tb_cla_adder`             | 48-bit random adds with carries; 7-bit adder exhaustively                     |
| `tb_csa_tree`              | 10, 7, 3 and 2 rows: sum + carry equals the row total                         |
| `tb_triple_gen`            | 3A at N = 24 (random and extremes) and at N = 6 (exhaustive)                  |
| `tb_nr8sd_digit_dec`       | all 8 stored digits in both forms                                             |
| `tb_nr8sd_ppg`             | every digit −4..+4 against random and extreme multiplicands                   |
| `tb_nr8sd_encoder`         | both forms at N = 24 and N = 8: value, digit set, agreement with the digit rule |
| `tb_nr8sd_coeff_rom`       | every entry of two ROMs, one-clock read latency, hold while disabled          |
| `tb_nr8sd_multiplier`      | both forms: 8000 random/extreme 24-bit products and all 65536 8-bit products  |
| `tb_nr8sd_premult_system`  | default top, 3000-cycle stream with gaps (details below)                      |
| `tb_nr8sd_premult_minus`   | the same stream with `FORM = NR8SD_MINUS`                                     |
| `tb_nr8sd_small_words`     | all 8×8 (65536) and 4×4 (256) products through the full system                |

`tb_nr8sd_premult_system` runs the top with no parameter overrides. Besides
checking every product, it checks that `out_valid` comes exactly two clocks after
`in_valid`. It also counts how often each mechanism was used and fails if any
never occurred:

- every digit value of the form, in the low digits;
- every magnitude and both signs, in the top digit;
- negated rows;
- the 3A multiple;
- back-to-back issue.

The reference values are independent of the RTL. `tb/nr8sd_ref_pkg.sv` decodes
an encoded word by the digit weights and derives digits by plain arithmetic.
Products are compared against the simulator's `*`.

To simulate a testbench with Verilator, for example the full system:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_nr8sd_premult_system \
    -y rtl -y tb +libext+.sv rtl/nr8sd_pkg.sv tb/nr8sd_ref_pkg.sv tb/tb_nr8sd_premult_system.sv
./obj_dir/Vtb_nr8sd_premult_system
```

Every testbench runs in under a second.

## Where this design fills gaps in the source scheme

The published description of the NR8SD multiplier gives three things:

- the digit sets;
- three stored bits per digit, with a Booth-encoded top digit;
- the block structure: a pre-encoded ROM, partial-product generators, a CSA
  tree and a fast CLA.

It works out the gate-level details only for the radix-4 (NR4SD) version. This
design chose the following:

- **Digit cells.** The radix-8 digit cell (HA/HA* order per form) and the
  decoder equations are derived here from the digit sets and the digit rule
  above, not taken row by row from published radix-8 truth tables. For the top
  digit the rule reproduces the radix-8 Booth table.
- **Storage of the top digit.** It is stored as five Booth select bits.
- **Sign handling.** The method (an inverted top bit plus a correction
  constant) follows the radix-4 version. The constant is worked out here for
  radix 8.
- **Adders and tree.** The tree shape and the Kogge-Stone adder are this
  design's own choice.
- **System level.** The pipeline registers, valid signals, reset, ROM depth,
  coefficient set and `N+2`-bit row width are this design's own choices. The
  source gives only that the ROM supplies one coefficient per clock.
- **Form.** Both digit forms are offered. `NR8SD_PLUS` is the default, because
  the source lists its digit set first.
- **Operand width.** The default width N = 24 follows the source's example of a
  24-bit coefficient giving 8 partial products. The FPGA figures it reports are
  for 8×8 and 4×4 multiplication. Those sizes are covered by
  `tb_nr8sd_small_words` with `N` set to 8 and 4.
