# 8x8 Vedic multiplier with multiplexer-based compressor adders

An unsigned 8x8 multiplier that sums its partial products column by column.
Each of the 16 product columns has one *compressor*: a circuit that counts
the ones among its inputs and returns the count in binary. The low bit of
that count is the product bit of the column. The higher bits are carries,
and each goes straight to the column its weight belongs to. Nothing is
summed row by row and no final carry-propagate adder is needed.

Two ideas are combined:

* **Urdhva-Tiryakbhyam ("vertically and crosswise").** This method from
  Vedic mathematics forms all 64 partial products `AiBj = a[i] & b[j]` at
  once. Product column `k` is the sum of every `AiBj` with `i + j = k`, plus
  the carries from lower columns.
* **Compressors built from 2:1 multiplexers.** The half adders and full
  adders inside every compressor use only 2:1 multiplexers and inverters.
  There are no XOR or AND gates. The published design reports that this
  cuts the combinational delay of the 8x8 multiplier on a Spartan-3E FPGA
  from 16.63 ns to 14.32 ns.

Everything is combinational: there is no clock, no reset and no handshake.
`p` is valid one propagation delay after `a` or `b` changes.

## The column equations

`Ck` names the carries in the order they are produced. A compressor's
output bit 1 (weight 2) goes to the next column. Bit 2 (weight 4) goes two
columns on, and bit 3 (weight 8) goes three columns on.

| column | carries in | partial products | inputs | compressor | outputs |
|---|---|---|---|---|---|
| 0  | –             | A0B0          | 1  | wire (AND term) | S0 |
| 1  | –             | A0B1, A1B0    | 2  | 2-2 (half adder) | C1 S1 |
| 2  | C1            | A0B2 .. A2B0  | 4  | 4-3  | C3 C2 S2 |
| 3  | C2            | A0B3 .. A3B0  | 5  | 5-3  | C5 C4 S3 |
| 4  | C3 C4         | A0B4 .. A4B0  | 7  | 7-3  | C7 C6 S4 |
| 5  | C5 C6         | A0B5 .. A5B0  | 8  | 8-4  | C10 C9 C8 S5 |
| 6  | C7 C8         | A0B6 .. A6B0  | 9  | 9-4  | C13 C12 C11 S6 |
| 7  | C9 C11        | A0B7 .. A7B0  | 10 | 10-4 | C16 C15 C14 S7 |
| 8  | C10 C12 C14   | A1B7 .. A7B1  | 10 | 10-4 | C19 C18 C17 S8 |
| 9  | C13 C15 C17   | A2B7 .. A7B2  | 9  | 9-4  | C22 C21 C20 S9 |
| 10 | C16 C18 C20   | A3B7 .. A7B3  | 8  | 8-4  | C25 C24 C23 S10 |
| 11 | C19 C21 C23   | A4B7 .. A7B4  | 7  | 7-3  | C27 C26 S11 |
| 12 | C22 C24 C26   | A5B7 .. A7B5  | 6  | 6-3  | C29 C28 S12 |
| 13 | C25 C27 C28   | A6B7, A7B6    | 5  | 5-3  | C31 C30 S13 |
| 14 | C29 C30       | A7B7          | 3  | 3-2 (full adder) | C32 S14 |
| 15 | C31 C32       | –             | 2  | 2-2 (half adder) | C33 S15 |

The scheme is exact. Each column's count, with every bit sent to the column
of its weight, keeps the total value unchanged. How many inputs each column
has follows from the output widths of the columns below it.

`C33` would be a 17th product bit. The product of two 8-bit numbers fits in
16 bits, so `C33` is always 0. It is not a port. An immediate assertion in
`vedic_mult_8x8` checks that it stays 0.

The input order inside a compressor does not matter, because a compressor
only counts. So the delay-critical inputs could be moved to the shallow end
of a compressor without changing the function. This RTL does not do that.

## Compressors

Every `N`-input compressor returns `ceil(log2(N+1))` bits. The 5-3
compressor, for example, gives `101` when all five inputs are 1. All of
them use only two cells:

* `ha_mux`, the half adder: `s = a ? ~b : b` and `co = a ? b : 0`.
* `fa_mux`, the full adder: a first multiplexer forms `p = a ? ~b : b`.
  Then `s = p ? ~ci : ci` and `co = p ? ci : a`.

Each wider compressor reduces its bits one weight at a time. It adds groups
of three equal-weight bits with full adders and a left-over pair with a half
adder. This goes on until one bit is left at each weight. The exact
arrangement of each compressor is written in the header of its file. These
arrangements are this design's own, because the published circuit diagrams
were not available. Each one is checked against all `2^N` input patterns.

| module | inputs | outputs | cells |
|---|---|---|---|
| `ha_mux`    | 2  | 2 | 2 mux |
| `fa_mux`    | 3  | 2 | 3 mux |
| `comp_4_3`  | 4  | 3 | 1 FA, 2 HA |
| `comp_5_3`  | 5  | 3 | 2 FA, 1 HA |
| `comp_6_3`  | 6  | 3 | 3 FA, 1 HA |
| `comp_7_3`  | 7  | 3 | 4 FA |
| `comp_8_4`  | 8  | 4 | 4 FA, 3 HA |
| `comp_9_4`  | 9  | 4 | 5 FA, 2 HA |
| `comp_10_4` | 10 | 4 | 6 FA, 2 HA |

## Dedicated and general forms

`vedic_mult_8x8` has one parameter, `GENERAL_N10`:

* `0` (default), the **dedicated** form. Each column uses the compressor
  made for its number of inputs, as in the table above. This is the faster
  form: 12.27 ns against 14.32 ns in the published FPGA results.
* `1`, the **general** form. Every column with two or more inputs uses the
  10-input compressor, with its unused inputs tied to 0. Only the low
  `ceil(log2(N+1))` bits of its count are used. The upper bits are always 0
  and are left open on purpose, so lint reports them as unused.

Both forms give the same product. `column_compressor` is the small wrapper
that picks the compressor for a column from `N` and `GENERAL`.

Reading "general" as "the 10-input compressor with zero-padded inputs" is an
interpretation. The published design names the two forms and compares their
delays, but does not spell out what the general form contains.

## Files

| file | contents |
|---|---|
| `rtl/vedic_pkg.sv` | operand and product widths, `cnt_width(n)` |
| `rtl/mux2.sv` | 2:1 multiplexer |
| `rtl/ha_mux.sv`, `rtl/fa_mux.sv` | multiplexer half and full adder |
| `rtl/comp_4_3.sv` .. `rtl/comp_10_4.sv` | compressors for 4 to 10 inputs |
| `rtl/column_compressor.sv` | chooses the compressor for a column |
| `rtl/vedic_pp_gen.sv` | partial products `pp[i][j] = a[i] & b[j]` |
| `rtl/vedic_mult_8x8.sv` | top level: ports `a[7:0]`, `b[7:0]`, `p[15:0]` |

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_mux2`, `tb_ha_mux`, `tb_fa_mux` and `tb_comp_*` try every input
  pattern. The compressor testbenches also check that every count value
  0..N occurs.
* `tb_vedic_pp_gen` tries corner cases and 500 random operand pairs. It
  checks every partial product and their weighted sum.
* `tb_vedic_mult_8x8` runs the dedicated and general forms side by side on
  all 65536 operand pairs. It also uses its own model of the columns to
  count how often each column and each compressor size sets its top output
  bit, i.e. sends its farthest carry. Any column or size where that never
  happens counts as a failure. For column 15 the check is reversed: its top
  bit, `C33`, must never be set.
* `tb_vedic_mult_8x8_full` checks the top with default parameters on all
  65536 operand pairs.

To simulate one of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/vedic_pkg.sv \
    tb/tb_vedic_mult_8x8.sv --top-module tb_vedic_mult_8x8 -o sim
./obj_dir/sim
```

Each run takes well under a second.

## What this RTL does not cover

* **Timing.** The published results are FPGA combinational delays. This RTL
  only fixes the logic structure. What delay it reaches depends on how the
  synthesis tool maps the multiplexers: an FPGA tool packs them into LUTs,
  and an ASIC flow may rebuild the logic.
* **Baselines.** The gate-based half and full adders and the older
  compressor designs that the published results compare against are not
  included.
* **Signed operands.** Signedness is never stated in the published design.
  The operands are taken as unsigned, with bit 0 as the least significant
  bit.
* **Wider multipliers.** 16-bit and 32-bit versions are only mentioned as
  future work. The same column scheme would extend to them, but it would
  need compressors with more inputs.
