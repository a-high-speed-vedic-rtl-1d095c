# Compressor-based Urdhwa Tiryakbhyam 8×8 multiplier

An unsigned 8-bit × 8-bit combinational multiplier. It is built on the
*Urdhwa Tiryakbhyam* ("vertically and crosswise") method of Vedic arithmetic,
and it uses 4:2 and 7:2 compressors for the additions in place of long chains
of half and full adders.

Urdhwa Tiryakbhyam is column multiplication written out for hardware. Product bit
`k` is the low bit of column `k`. Column `k` holds every AND product
`a[i] & b[j]` with `i + j = k`, plus the carries that lower columns push up.
All 64 AND products are formed at once, before any addition starts.
All the difficulty, and all the delay, lies in adding up each column.
Column 7 alone holds eight products and three carries. A full adder takes only
three bits at a time, so a column of eleven bits built from full adders
becomes a deep chain. Compressors take more bits per step, with fewer gate
delays per bit removed.

```
a[7:0], b[7:0] ──► urdhwa_pp_gen ──► 64 partial products, grouped by column
                                        │
              column 0 … column 15, one counter per column
              (HA / 4:2 / 7:2 / 7:2+HA / XOR), carries to k+1 and k+2
                                        │
                                        ▼
                                    p[15:0]
```

## Files

| file | module | role |
|---|---|---|
| `rtl/vedic_pkg.sv` | package | `OPERAND_W = 8`, `PRODUCT_W = 16`, `operand_t`, `product_t` |
| `rtl/vedic_mult8.sv` | `vedic_mult8` | top: partial products and per-column reduction |
| `rtl/urdhwa_pp_gen.sv` | `urdhwa_pp_gen #(N=8)` | AND array, `pp[i][j] = a[i] & b[j]` |
| `rtl/compressor_7_2.sv` | `compressor_7_2` | 10-bit column counter made of two 4:2 compressors, an HA and two FAs |
| `rtl/compressor_4_2.sv` | `compressor_4_2` | 5-bit column counter made of XOR gates and multiplexers |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | `half_adder`, `full_adder` | 2-bit and 3-bit counters used inside the compressors and columns |
| `tb/tb_*.sv` | | one self-checking testbench per module above |

## The 4:2 compressor

This block adds four bits `x0..x3` and a carry-in `cin`, all of the same weight:

```
x0 + x1 + x2 + x3 + cin = sum + 2·(cout + carry)

y1 = x0 ^ x1      y2 = x2 ^ x3      y3 = y1 ^ y2
sum   = y3 ^ cin
cout  = y1 ? x2  : x0
carry = y3 ? cin : x3
```

The longest path passes through three XOR or MUX levels. An equivalent circuit
of full and half adders needs about five gate delays. `cout` never depends on
`cin`. That independence is what lets a row of these compressors avoid a
ripple through `cout`.

## The 7:2 compressor and its output weights

The name counts seven column bits and two incoming carries. The block actually
has ten inputs: `a[7:0]`, `cin1` and `cin2`. Each of its two internal 4:2
compressors takes five of them. Read it as a 10-input column counter with four
outputs:

```
            a[3:0],cin1 ─► 4:2 (lo) ─ sum ─┐
            a[7:4],cin2 ─► 4:2 (hi) ─ sum ─┴► HA ─► sum            (weight 1)
                                              └ carry ─┐
   cout(lo), cout(hi) ──────────────────────────────► FA1 ─ carry ─► c1 (weight 4)
                                                        └ sum ──┐
   carry(lo), carry(hi) ────────────────────────────────────► FA2 ─ sum   ─► c2 (weight 2)
                                                                 └ carry ─► c3 (weight 4)

   popcount(a) + cin1 + cin2 = sum + 2·c2 + 4·(c1 + c3)
```

The parts and the order in which they follow one another are those of the
published 7:2 structure: two 4:2 compressors, one half adder, then two full
adders in series. The published drawing does not say which compressor output
feeds which full adder. The routing shown above is this design's own, and it
is chosen so that the count is exact. As a consequence, the outputs do **not**
form a binary number:

- `c2` belongs to the next column.
- `c1` and `c3` both belong to the column after that.

The top module wires them that way.

## Column plan of the multiplier

Each column is reduced to one product bit by a single counter. The count of
bits that reach the column decides which counter it gets:

| column | products | carries in | bits | counter |
|---:|---:|---:|---:|---|
| 0 | 1 | 0 | 1 | wire |
| 1 | 2 | 0 | 2 | half adder |
| 2 | 3 | 1 | 4 | 4:2 (`cin` = 0) |
| 3–6 | 4–7 | 1–3 | 6–10 | 7:2 |
| 7, 8 | 8, 7 | 3, 4 | 11 | 7:2, then a half adder adds the 11th bit to its sum |
| 9–12 | 6–3 | 4–3 | 10–6 | 7:2 |
| 13, 14 | 2, 1 | 3, 4 | 5 | 4:2 |
| 15 | 0 | 2 | 2 | XOR |

Carries travel as follows:

- A half adder or a 4:2 compressor sends its carries to column `k+1`.
- A 7:2 compressor sends `c2` to column `k+1`, and `c1` and `c3` to column `k+2`.
- Unused compressor inputs are tied to 0.

Column 15 needs nothing beyond an XOR. The product is below 2¹⁶, so at most one
of the two carries from column 14 can be 1, and nothing leaves column 15.
The top-level testbench checks this on every input pair. The carry signals in
`vedic_mult8` are named `k<column>_<output>`, for example `k7_h` or `k5_c3`.
That naming makes each route easy to follow against the table.

The datapath has no clock and no reset. The product is valid one settling time
after the operands change, and the design has 32 pins: 16 in and 16 out.

## What follows the published design, and what does not

These points follow the published design:

- unsigned 8-bit operands and a combinational 16-bit product;
- AND-gate partial products formed in parallel;
- column additions done by 4:2 and 7:2 compressors, with XOR where no carry can arise;
- the gate structure of the 4:2 compressor;
- the component list of the 7:2 compressor.

These are this design's own choices:

- **Column assignment and carry routing.** Only the overall structure of the
  compressor-based multiplier is published, so the table above is a
  reconstruction. The published version is reported to need 12 adder stages
  where the adder-only version needs 15. This design does not claim that
  count. It resolves the columns from bit 0 upwards, so the carries ripple
  from column to column, and the critical path depends on that ripple.
- **The extra half adders in columns 7 and 8.** They are needed because those
  columns receive 11 bits in this routing.
- **The 7:2 internal routing and output weights**, described above.
- **The multiplexer select inputs in the 4:2 compressor.** The usual choice was
  taken; it is the one that makes the compressor exact.

The published comparison (Xilinx Spartan-3E: 176 LUTs and 15.52 ns, against
Booth, modified Booth and an adder-only Urdhwa multiplier) is not reproduced.
The baseline multipliers are not included.

`vedic_mult8` is written for 8 bits only, since its column table is laid out by
hand. `urdhwa_pp_gen` is generic in `N`. A different operand width would need
a new column table.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_compressor_4_2` | All 32 input combinations: the count identity, the parity of `sum`, and that `cout` does not depend on `cin`. |
| `tb_compressor_7_2` | All 1024 input combinations: the count identity with weights 1/2/4/4, the parity of `sum`, and that every carry output goes high at least once. |
| `tb_half_adder`, `tb_full_adder` | All input combinations against the count identity. |
| `tb_urdhwa_pp_gen` | Corner operands and 2000 random pairs: every product bit, and that the weighted sum of all products equals `a*b`. |
| `tb_vedic_mult8` | All 65,536 operand pairs against `a*b`. |

`tb_vedic_mult8` also counts, through hierarchical references, how often each
of these happened:

- a 4:2 compressor set both carries;
- a 7:2 compressor sent a carry two columns up;
- the half adder of column 7 produced a carry;
- the half adder of column 8 produced a carry;
- product bit 15 was set.

It fails if any of these never happened.

Each testbench was also run against a deliberately broken copy of its module,
and all of them then failed:

- 4:2 compressor: the carry MUX picks the wrong input;
- 7:2 compressor: one full-adder input is swapped;
- partial-product generator: one AND becomes an OR;
- top: the column-8 half adder drops its carry.

To simulate with Verilator (5.x), run from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/vedic_pkg.sv \
          tb/tb_vedic_mult8.sv --top-module tb_vedic_mult8 -Mdir obj_tb
./obj_tb/Vtb_vedic_mult8
```

Replace `tb_vedic_mult8` with another testbench's name to run that one. Lint
with `verilator --lint-only -Wall -Irtl rtl/vedic_pkg.sv rtl/vedic_mult8.sv`.
