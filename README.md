# Compressor-based vertical-and-crosswise multiplier

An unsigned 8 x 8 combinational multiplier. It forms the partial products the
"vertical and crosswise" way (Urdhva Tiryagbhyam): bit *j* of the product comes
from column *j*, the set of products `a[i] & b[j-i]`, plus what the lower
columns carry in. All columns are formed at once. The speed depends on how the
columns are added. Here they are added with multi-input compressors instead of
rows of full adders. A compressor takes many bits of one column and returns
fewer bits. Its carries go sideways to higher columns without waiting for its
own carry-in.

Two compressors do the work:

* a **4:2 compressor** made of two XOR-XNOR cells and four 2:1 multiplexers;
* a **7:2 compressor** made of two of those 4:2 compressors, one half adder and
  two full adders.

## The XOR-XNOR 4:2 compressor (`compressor_4_2`)

It counts five bits of equal weight: four column bits X1..X4 and a carry-in
from the compressor in the column below:

    X1 + X2 + X3 + X4 + cin = sum + 2*(carry + cout)

`cout` goes to the next column's `cin`. It depends only on X1..X3, never on
`cin`, so a chain of these compressors along a row settles in a fixed time
whatever its length.

The usual build is two full adders in series, or those full adders split into
four XOR levels. This one keeps a single XOR level, two XOR-XNOR cells side
by side, and uses multiplexers for the rest. The key point is that the control input of a multiplexer can arrive
before its data inputs. Signal by signal:

| signal | formula | built as |
|---|---|---|
| x12, x12n | X1 ^ X2 and its complement | XOR-XNOR cell |
| x34, x34n | X3 ^ X4 and its complement | XOR-XNOR cell |
| cout | x12 ? X3 : X1 | mux, which gives the majority of X1, X2, X3 |
| p | x34 ? x12n : x12 | mux, giving X1^X2^X3^X4 without a third XOR |
| carry | p ? cin : X4 | mux |
| sum | p ? ~cin : cin | mux, giving p ^ cin |

`cin` is the late input, because it comes from the neighbouring compressor. It
only ever drives the data inputs of the last two multiplexers. By then `p`
already holds their select value. So the path from `cin` to `sum` and `carry`
is one multiplexer deep.

The `cout` and `carry` equations, the two XOR-XNOR cells and the four
multiplexers follow the published compressor. Two details are this design's
own reading:
the sum multiplexer chooses between `cin` and its complement, and `x34`
selects the parity multiplexer.

## The 7:2 compressor (`compressor_7_2`)

It takes nine bits of one column: seven column bits and two carries, `cin1` and
`cin2`. It returns four bits:

    X1+...+X7 + cin1 + cin2 = sum + 2*carry + 4*(cout1 + cout2)

```
  X1..X4, cin1 -> [4:2 A] -> s1, c1, c2
  X5..X7, cin2 -> [4:2 B] -> s2, c21, c22        (B's own cin = 0)
  HA (s1, s2)        -> sum,   s3
  FA1(s3, c1, c21)   -> t,     cout1
  FA2(t,  c2, c22)   -> carry, cout2
```

`sum` stays in the column. `carry` moves one column up. `cout1` and `cout2`
move **two** columns up, where they become that column's `cin1` and `cin2`.

**Where this departs from the published circuit.** The published wiring feeds
the first full adder's carry into the second full adder, next to `c2` and
`c22`. That carry counts 4 and the other two count 2, so the published
equations do not add correctly. Here the second full adder takes the first full
adder's sum instead, and both full-adder carries leave as weight-4 outputs.
The block count (two 4:2, one HA, two FA), the half adder on the two compressor
sums, and the first full adder's inputs are unchanged. Nine bits sum to at most
9, and the four outputs can show up to 11, so no input combination is lost.

The carry outputs depend on `cin1`/`cin2` through the half adder. So the carry
path from column *j* to column *j*+2 runs through every second column. This is
the one place in the design with a chain whose length grows with the operand
width.

## Putting the columns together (`urdhwa_multiplier`)

```
 column j:  up to 8 crosswise products
            |-- products 1..7 --> 7:2 (cin1/cin2 from column j-2) --> s1[j], c1[j] (to j+1)
            |-- product 8 ------------------------------+
 step 2:    s1[j], c1[j-1], product 8 --> 4:2 (cin from column j-1) --> s2[j], c2[j] (to j+1)
 step 3:    p = s2 + (c2 << 1)
```

At 8 bits, only the middle column (j = 7) has an eighth product, and that
product skips step 1. The network has two extra columns above bit 15. Those
columns catch carries that leave the top column. Because `a*b < 2^16`, their
bits are always zero, and the output drops them.

The published work gives the compressors and the vertical-and-crosswise scheme.
It does not give the operand width, how the compressors are arranged into a
multiplier, or the final adder. The following are this design's choices:

* the 8-bit width;
* the two-step arrangement above;
* a plain `+` for the final carry-propagate addition.

The 8-bit width fits the size reported for the design, about 143 four-input
LUTs on an FPGA.

Interface: `a[WIDTH-1:0]`, `b[WIDTH-1:0]` in, `p[2*WIDTH-1:0] = a*b` out. There
is no clock and no register. `WIDTH` may be 2..8, because each column holds at
most eight products: seven for the 7:2 step and one for the 4:2 step. Larger
widths would need more compressors per column and are not supported.

## Files

| file | content |
|---|---|
| `rtl/urdhwa_multiplier.sv` | top: crosswise products, compressor columns, final adder |
| `rtl/compressor_7_2.sv` | 7:2 compressor |
| `rtl/compressor_4_2.sv` | XOR-XNOR / multiplexer 4:2 compressor |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | 1-bit adders used in the 7:2 compressor |
| `rtl/xor_xnor.sv`, `rtl/mux2.sv` | the two primitives of the 4:2 compressor |
| `tb/tb_*.sv` | one self-checking testbench per module above (not the primitives) |
| `tb/tb_urdhwa_multiplier_widths.sv` | the multiplier at widths 2 to 7 |

## Verification

Every testbench is exhaustive and compares results with integer arithmetic
worked out in the testbench:

* `tb_half_adder`, `tb_full_adder`: all input combinations.
* `tb_compressor_4_2`: all 32 inputs. It checks the counting identity and
  each output against its own equation. One of these checks confirms that
  `cout` is independent of `cin`.
* `tb_compressor_7_2`: all 512 inputs. It checks the counting identity and
  the sum parity.
* `tb_urdhwa_multiplier`: all 65536 operand pairs at the default width. It
  also counts how often each of the following happens, and fails if one never
  does:
  * a 7:2 compressor carries two columns up;
  * a 4:2 compressor carries one column up;
  * the eighth middle-column product is set;
  * both carry inputs of a 7:2 compressor are high.
* `tb_urdhwa_multiplier_widths`: one multiplier for each width from 2 to 7,
  each tested with all operand pairs.

Each testbench prints `TB_RESULT checks=N failures=M`. Each testbench was also
run against a deliberately broken copy of its module, and every one failed
there. For example, the published 7:2 wiring described above gives 416
failures out of 1024 checks.

No timing or area figures were measured. The design has not been synthesized
for a particular FPGA.

## Simulating

With Verilator 5, from the repository root:

    verilator --binary --timing --assert -Irtl --top-module tb_urdhwa_multiplier tb/tb_urdhwa_multiplier.sv
    ./obj_dir/Vtb_urdhwa_multiplier

The other testbenches run the same way. The full multiplier run takes well
under a second. To try another width, set `WIDTH` on the instance in the
testbench, together with the testbench's `W`.

## What is not here

The published work compares its multiplier with two others. One uses 4:2
compressors made of two full adders. The other uses 4:2 compressors made only
of XOR gates and multiplexers. Those are reference points, not part of this
design, and are not included.
