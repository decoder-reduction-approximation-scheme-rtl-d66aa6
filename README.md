# Radix-4 Booth multiplier with decoder-reduction approximation

A signed 16 × 16-bit multiplier with a 32-bit product, built as a fully
combinational radix-4 Booth multiplier. Its Booth decoders can optionally be
replaced by a cheaper *decoder-reduction* (DRA) variant. The DRA decoder
never produces the ±2 digits, so those groups need no 2×multiplicand path.
By default every group uses the exact decoder, and the product is exact.
The parameter `APPROX_GROUPS` switches the lowest groups to the approximate
decoder. This trades accuracy in the low-order part of the product for
simpler decode and selection logic.

## Datapath

```
 b ──► {b,0} ──► 8 × booth_encoder ──ctrl──► 8 × pp_gen ◄── a
                                               │ pp, neg
                                               ▼
                          9 rows × 32 bits (8 shifted partial products
                                            + 1 row of negation bits)
                                               ▼
                                        csa_tree (3:2 Wallace)
                                               │ sum, carry
                                               ▼
                                        cla_adder (32-bit CLA) ──► c
```

| Module | Role |
|---|---|
| `booth_pkg` | The `booth_ctrl_t` type (`neg`, `one`, `two`) shared by the decoder and the partial-product generator. |
| `booth_encoder` | Decodes one 3-bit group into a Booth digit. It is exact or approximate depending on the `APPROX` parameter. |
| `pp_gen` | Selects 0, a or 2a. For a negative digit it inverts the value and outputs the missing +1 as `neg`. |
| `carry_save_adder` | A row of full adders, i.e. a word-wide 3:2 compressor. |
| `csa_tree` | Wallace-style reduction of N rows to two. |
| `cla_adder` | Two-level carry-lookahead adder with 4-bit blocks. |
| `booth_mul_16x16` | The top. It wires the four stages together. |

### Booth recoding

A 0 is appended below the LSB of the multiplier `b`. The result is cut into
eight overlapping groups `{b[2g+1], b[2g], b[2g-1]}`, with g = 0…7. Each group
gives one digit d_g, and the product is a · Σ d_g · 4^g.

| group | exact digit | DRA digit |
|---|---|---|
| 000, 111 | 0 | 0 |
| 001, 010 | +1 | +1 |
| 011 | **+2** | **+1** |
| 100 | **−2** | **−1** |
| 101, 110 | −1 | −1 |

In the logic, a group is non-zero when its three bits are not all equal, and
its sign is the top bit. The exact decoder selects 2a when the two lower bits
are equal. The DRA decoder always selects a.

### Partial products and the negation row

`pp_gen` outputs a 17-bit value: 0, a or 2a, bitwise inverted for a negative
digit. The top sign-extends it to 32 bits and shifts it left by 2g. The +1
that completes each two's-complement negation is not added inside `pp_gen`.
Instead, all eight of these bits form one extra row, with `neg_g` in column
2g. This gives nine rows, which the carry-save tree reduces in four
full-adder levels (9 → 6 → 4 → 3 → 2). The final adder then resolves the
last two rows. All arithmetic is modulo 2^32, and carries out of bit 31 are
dropped. Sign extension is explicit: every row is a full 32-bit
two's-complement number.

### What the approximation costs

Changing a ±2 digit to ±1 in group g changes the product by |a|·4^g. The
error of a product is therefore bounded by Σ_{g<APPROX_GROUPS} |a|·4^g. It is
zero whenever none of the approximated groups holds `011` or `100`.
`tb_booth_mul_error` measured the following over 200,000 uniformly random
signed operand pairs:

| APPROX_GROUPS | error rate | mean error distance | mean relative error |
|---|---|---|---|
| 0 | 0 | 0 | 0 |
| 1 | 0.250 | 4.1e3 | 7.9e-5 |
| 2 | 0.437 | 1.8e4 | 3.2e-4 |
| 3 | 0.577 | 7.5e4 | 1.2e-3 |
| 4 | 0.682 | 3.0e5 | 4.1e-3 |
| 8 | 0.900 | 7.7e7 | 0.236 |

Only a few low groups give errors confined to the low-order bits. With all
eight groups approximated, the error reaches the top of the product and the
result is no longer usable as a multiplication.

## Interface and timing

```systemverilog
booth_mul_16x16 #(
  .WIDTH        (16),  // operand width, multiple of 4
  .APPROX_GROUPS(0)    // 0..WIDTH/2 low-order groups using the DRA decoder
) u_mul (
  .a(a),               // [WIDTH-1:0]   signed multiplicand
  .b(b),               // [WIDTH-1:0]   signed multiplier (Booth-recoded)
  .c(c)                // [2*WIDTH-1:0] signed product
);
```

There is no clock, no reset and no handshake. `c` follows `a` and `b` after
the combinational delay: 1 decode level, 1 select/invert level, 4
carry-save levels and a 32-bit CLA. To pipeline the multiplier, register the
`csa_tree` outputs or the operands and product in the surrounding design.
Because `b` is the recoded operand, an approximate multiplier is not
symmetric: a·b and b·a can differ.

## Where this design departs from, or fills in, its source description

- **Default is exact.** The method is described both as an approximation
  and as an accurate multiplier whose simulated products are exact. This
  RTL follows the accurate reading. The approximation is a static parameter
  applied to the least significant groups, which is how "configurable level
  of approximation" and "errors in the LSBs" are read here. Run-time
  switching of the approximation level is not provided.
- **Decoder equations.** The tables above are implemented as given. The
  printed Boolean simplification of the approximate decoder does not match
  its own table, so the logic here is derived from the table.
- **Decoder count.** One passage claims the scheme halves the number of
  decoders (N/4). Another says it keeps all eight and makes each simpler.
  This design keeps eight.
- **Signed only.** The multiplier handles two's-complement operands. Support
  for unsigned operands, which is claimed as free, would need a ninth Booth
  group and is not built.
- **No pipeline registers, clock gating or operand isolation.** These are
  mentioned as options. The reference implementation reports no flip-flops.
- **Accumulation structure.** The described structure (CSA tree plus CLA) is
  built. An adder chain, which a gate-level schematic of a reference build
  suggests, is not used.
- Own choices: the neg/one/two control encoding, the separate negation-bit
  row, greedy Wallace grouping, 4-bit CLA blocks, and which operand is
  recoded.

## Verification

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a time-out watchdog.

| Testbench | What it checks |
|---|---|
| `tb_booth_encoder` | All 8 groups, exact and DRA, against the literal tables. |
| `tb_pp_gen` | `signed(pp) + neg == d·x` for every digit, on corner and 2,000 random multiplicands. |
| `tb_csa_tree` | `sum + carry ==` the row total, for 9-row and 4-row trees, random and all-ones rows. |
| `tb_cla_adder` | `{cout,s}` against a 33-bit addition, including carry-chain corners. |
| `tb_booth_mul_16x16` | Exact, 2-group and 8-group multipliers against a digit-by-digit reference, on corner, reference and 100,000 random pairs. It also counts that +2 and −2 digits, negative and zero digits, and both changed and unchanged approximate products all occur. |
| `tb_booth_mul_full` | The default top (no parameter overrides): every a against 6 fixed b values and the reverse, plus 1,000,000 random pairs. It includes the pair a = `1111110010011101`, b = `0000001101111001` → `0xFFF43D35`. |
| `tb_booth_mul_error` | All 9 approximation levels: the error bound, exactness when no ±2 group is approximated, and the accuracy table above. |

To run one testbench with Verilator (5.x):

```sh
verilator --binary --timing --assert --top-module tb_booth_mul_16x16 \
    -y rtl -y tb +libext+.sv -Irtl rtl/booth_pkg.sv tb/tb_booth_mul_16x16.sv
./obj_dir/Vtb_booth_mul_16x16
```

Each testbench runs in under a few seconds. The package file must be given
explicitly. The other modules are found through `-y`.
