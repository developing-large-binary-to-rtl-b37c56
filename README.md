# Binary-to-BCD conversion from cascaded look-up memories

The classic shift-and-add-3 ("double dabble") conversion of a binary number to
BCD can be unrolled in space. The result is a purely combinational converter
built from one small cell repeated many times. This RTL builds such converters
from look-up memories of four sizes (E4, E6, E9 and E13) and shows how the
larger units are obtained by merging cells of the smaller lattice. It also
reuses the same memories in two sequential forms:

* a **hybrid** converter: one E4, E6, E9 or E13 memory (or two or three E6)
  works on a rotating register under a short program;
* a **feed-back** converter: a static binary-to-BCD lattice placed in a
  successive-approximation loop converts BCD back to binary.

All blocks are plain synthesizable SystemVerilog (IEEE 1800-2017). Each has a
self-checking testbench.

## The decade step

Take one BCD decade during the conversion. Just before a shift its value `x`
is 0..9. The correction step replaces `x` by `x + 3` when `x >= 5`. The shift
then moves the top bit of the corrected value into the next decade. The other
three bits stay, with the next incoming bit appended below them. Written with
the remainder `r = x mod 5` and the carry `q = (x >= 5)`:

```
x  = 2*r_prev + b_in        (b_in: bit shifted in from below)
q  = x >= 5                 (bit shifted out to the next decade)
r  = x mod 5                (stays, 0..4)
```

The state that one decade passes from step to step is therefore a number
0..4 held in three bits. This is why the memories below have "modulo 5"
fields. A decade sees a stream of input bits, MSB first: the binary number
for the units decade, and the carries of the decade below for every other
decade. The last bit of each stream is never corrected; it becomes the lowest
bit of the final BCD digit.

For an `N`-bit number (padded with leading zeros to a multiple of 3,
`K = N/3 - 1`), decade `k` performs `3*(K-k)` steps. The top decade performs
none: it just collects three carries, so its digit is at most 7.

## The look-up units

Each unit does several decade steps at once. Its contents are a mixed-radix
renumbering of the line number. The input code writes the line number with
the incoming remainder digit on top. The output code writes the same line
number with the carry digits on top and the new remainder at the bottom.
`bcd_pkg` computes every word from this rule when the design is elaborated,
so no table data is stored in the sources.

| unit | file | words x bits | input code (MSB..LSB radices) | output code | what it replaces |
|---|---|---|---|---|---|
| E4 | `e4_decoder` | 10 x 4 | x (0..9) | {x>=5, x mod 5} | one step |
| E6 | `e6_decoder` | 40 x 6 | 5, 8 | 8, 5 | three steps of one decade |
| E9 | `e9_decoder` | 320 x 9 | 5, 8, 8 | 8, 8, 5 | six steps of one decade (two E6) |
| E13 | `e13_decoder` | 3200 x 13 | 10, 5, 8, 8 | 8, 8, 10, 5 | six steps each of two neighbouring decades (four E6) |

Examples that the testbenches check:

* E6 line 19: `010 011` gives `011 100`.
* E9 line 177: `010 110 001` gives `100 011 010`.
* E13 line 3150: `1001 100 001 110` gives `111 111 0000 000`.

The E13 needs a closer look. Its 4-bit field is the upper decade's value
*before* its next correction. That value is the remainder doubled plus one
pending carry from below, so it can be 0..9. The six carries of the lower
decade never leave the memory. They feed the upper decade's six steps, and
the last of them is handed on as the pending bit of the output value. This
relation makes the table exact:
`((d*5 + r)*64 + b) = ((Q*10) + d')*5 + r'`.

Input codes that never occur (a remainder field of 5..7, or a decimal field
of 10..15) read as 0.

## Static lattices

`static_conv_e6` is the central structure. Each E6 of decade `k` takes the
previous unit's remainder and the next three bits of the decade's stream. The
first unit of a decade takes `{0, s0, s1}` as its remainder and `s2..s4` as
data. Its three carries are appended to the stream of decade `k+1`.

A decade's first unit needs five stream bits, so the groups of neighbouring
decades are skewed by one bit: a unit of decade `k+1` draws one carry from
one unit of decade `k` and two carries from the next unit. Numbering the
units diagonal by diagonal (lower decade first) gives the familiar triangle:

```
decade 0:  1  2  4  7  11 ...
decade 1:     3  5  8  12 ...
decade 2:        6  9  13 ...
decade 3:           10 14 ...
```

Inside the RTL, unit `(decade k, group g)` is a generate instance
`dec[k].act.unit[g]`. The stream of each decade is one array element,
`stream[k]`, read MSB first (index 0 first).

The larger units merge parts of this lattice. Merging must not create a path
from a merged unit back into itself.

* **E9** (`static_conv_e9`) merges two consecutive E6 of one decade. The
  `GROUPING` parameter selects the pairing:
  * `1` (default): the first unit of every even decade stays alone, and the
    rest are paired as 2/4, 7/11, ... (odd decades as 3/5, 8/12, ...). This
    pairing has the shorter critical path.
  * `0`: every decade is paired from its first unit (1/2, 4/7, ...; 3/5, ...).

  A unit left alone is an E9 with its three top inputs tied to 0. It then
  behaves as an E6 and its three top outputs are always 0.
* **E13** (`static_conv_e13`) takes decades in pairs `(2j, 2j+1)`. The head
  unit of decade `2j` is an E6. Each E13 then covers groups `g, g+1` of the
  lower decade and groups `g-1, g` of the upper one (g = 1, 3, 5, ...).
  The number is padded to a multiple of 6 bits so that the decades pair up.
  At other sizes the top digit is simply 0.
* **E4** (`static_conv_e4`) is the unmerged tree, one E4 per step.

Units needed (the RTL produces exactly these):

| bits | E4 | E6 | E9 | E13 (E13 + E6) |
|---|---|---|---|---|
| 12 | 18 | 6 | 4 | 3 (1 + 2) |
| 24 | 84 | 28 | 16 | 10 (6 + 4) |
| 30 | 135 | 45 | 25 | 15 (10 + 5) |

The longest path, counted in unit accesses, follows from the wiring. At
50 ns per access it gives the conversion times of the source design's
comparison:

| bits | E6 | E9, GROUPING=0 | E9, GROUPING=1 | E13 |
|---|---|---|---|---|
| 18 | 9 | 8 | 7 | 5 |
| 24 | 13 | 12 | 10 | 7 |
| 30 | 17 | 16 | 13 | 9 |
| 42 | 25 | 24 | 19 | 13 |

Default sizes: 15 bits (E4), 24 bits (E6, E9), 30 bits (E13). Every module
takes `N` as a parameter and pads `N` up itself.

## Hybrid converter (`hybrid_conv`)

The E6 lattice can also be executed one unit at a time. The register holds
the number plus `N/3 - 1` leading zeros, `W = N + N/3 - 1` bits in all. One
E6 reads register bits `[N:N-5]` (the *window*), and its output is loaded
back into the same bits.

Unit `(k, g)` needs its six bits in the window, which takes a left rotation
of `3g - k` from the start position. Visiting the units in map order
therefore means rotating the register by the difference between neighbouring
units. After the last unit it rotates back to the start position. For
`N = 12`:

```
DECODE, L3, DECODE, R4, DECODE, L7, DECODE, R4, DECODE, R4, DECODE, L2
```

That is 12 left and 12 right single-bit shifts. At the end the register holds
the BCD digits in place. The top digit has only three stored bits.

The program is computed when the design is elaborated and placed in a small
memory of `(op, count)` words. A program counter and a shift counter step
through it.

* **Timing:** one clock per decode-and-load and one clock per single-bit
  shift. That gives 30 clocks for 12 bits (3 us at 10 MHz), 95 for 18,
  196 for 24 and 333 for 30.
* **Handshake:** pulse `start` while `busy` is low. `done` pulses together
  with the result, and `bcd` holds it until the next start.

Worked example, 2967:

```
000101110010111   start (3 leading zeros)
001000110010111   after the first decode/load
...
010100101100111   end: 2 | 1001 | 0110 | 0111 = 2967
```

### Two or three E6 units (`NDEC = 2, 3`)

Extra E6 units each read their own window, `OFF2` and `OFF3` bits below the
first one. Any unit of the lattice can then be done by any E6, each at a
different rotation. For every unit the program takes the E6 whose rotation
is nearest to the present one, and only that E6 is loaded. For 12 bits:

| form | offsets | shifts | clocks |
|---|---|---|---|
| single | - | 24 | 30 |
| double | 4 | 10 | 16 (1.6 us at 10 MHz) |
| triple | 3, 7 | 4 | 10 |

These offsets are the best ones for 12 bits and are the defaults. Other
sizes need other offsets. For example, with the greedy choice the double
form is best at offset -4 for 18 bits, -6 for 24 and -7 for 30; a negative
offset puts the window above the first one.

### E4 as the single unit (`DEC = 4`)

The window is register bits `[N:N-3]`. An E6 unit is three E4 steps whose
windows lie one bit apart, so each unit of the map becomes three decodes at
rotations `3g - k`, `+1` and `+2`. For 12 bits this takes 18 decodes and 36
shifts, 54 clocks.

### E9 as the single unit (`DEC = 9`)

The same register can be driven by one E9. It then runs the E9 lattice with
the 1, 2/4 pairing (`GROUPING = 1`). The window grows to bits `[N:N-8]`.

* A pair `(k, g..g+1)` needs a left rotation of `3g - k`. It loads all nine
  bits.
* A unit left alone `(k, g)` needs `3g - k - 3`. Its top three inputs are tied
  to 0 and only its low six outputs are loaded (operation `LOW`).
* Units are visited by the diagonal of their first group, lower decade first.
  With this pairing every unit comes after the units whose carries it reads.
  With the other pairing this order would not work.

Clocks: 26 for 12 bits, 63 for 18, 118 for 24 and 191 for 30. The 30-bit
count is a little over half of the E6 figure.

### E13 as the single unit (`DEC = 13`)

The E13 suits the register particularly well. Take the unit on groups
`g, g+1` of decade `2j`. Its thirteen inputs are one unbroken run of
register bits, starting at the bottom bit of group `g+1`:

* the six data bits;
* above them, the lower decade's remainder;
* at the top, the upper decade's remainder together with the carry waiting
  below it. Read as one 4-bit number, these four bits are exactly the E13's
  0..9 field.

The thirteen outputs land on the same run. So the window is a fixed set of
13 bits, `N-5` to `N+7`, taken around the ring; it may wrap past the top
bit.

* The unit on `(2j, g..g+1)` needs a left rotation of `3g - 2j + 3`.
* The head of decade `2j`, an E6 in the static lattice, is a `LOW` decode of
  the E13: seven top inputs tied to 0, six low outputs loaded, rotation
  `-2j`.
* Units are visited by diagonal, lower decade first.

`N` must be a multiple of 6. Clocks: 19 for 12 bits, 54 for 18, 106 for 24
and 175 for 30.

## Feed-back BCD-to-binary converter (`feedback_bcd2bin`)

R0 holds the BCD number, and R1 is a binary guess that starts at all ones.
An E6 lattice (`static_conv_e6 #(.N(K))`) decodes R1, and `bcd_comparator`
reports LOW, EVEN or HIGH against R0. A `K+1` stage ring counter selects the
bit under test:

* stage `n` clears bit `B_n` (B_1 is the MSB);
* stage `n+1` sets `B_n` again if the comparator now says LOW.

The bits below the one under test are still 1, so the guess reaches the
target exactly when the tested bit is the last 0 of the target. For a number
within range the run therefore always ends on EVEN, after at most `K+1`
clocks. A target above `2^K - 1` is reported by `ovf` (the very first compare
is LOW).

Example for 75 with `K = 8`. R1 goes through these values and the run ends
after 7 clocks:

```
11111111 -> 01111111 -> 00111111 -> 01011111 -> 01001111 -> 01000111 -> 01001011
```

The comparator is a plain unsigned comparison of the packed BCD vectors. For
valid BCD this is the decimal order.

## Top level

`bcd_conv_top` places the converters side by side, each with its own ports
(`s4_*`, `s6_*`, `s9_*`, `s13_*`, `hy_*`, `hd_*`, `h9_*`, `h13_*`, `fb_*`).
Only `clk` and `rst_n` are shared. The hybrid converters are:

* `hy_*`: 12 bits, one E6;
* `hd_*`: 12 bits, two E6;
* `h9_*`: 24 bits, one E9;
* `h13_*`: 30 bits, one E13.

Reset is asynchronous and active low. All BCD buses are packed, units digit
in bits `[3:0]`.

## Where this RTL departs from or adds to the source design

* **Padding.** Binary inputs are padded with leading zeros to a multiple of 3
  bits (6 for the E13 lattice). The hand-drawn trees instead cut units off at
  the exact size. The results are the same, but a few more units may be
  used.
* **Two counts differ from the source's comparison table.** At 42 bits the
  E13 lattice uses 28 units, where the table counts 27. At 12 bits the
  longest E6 path is 5 units, where the table lists 6. All its other unit
  counts and path lengths, 12 to 42 bits, agree with the RTL. Its E9 column
  is the `GROUPING = 0` lattice.
* **Hybrid clock count.** The hybrid converter spends a clock on every
  decode-and-load as well as on every shift. The 12-bit schedule has 24
  shift pulses but takes 30 clocks, in line with the 3 us quoted for 10 MHz.
  The schedule rule for sizes other than 12 bits is this design's
  generalisation, and it always rotates the direct way around. The E9 and
  E13 schedules and windows are also this design's own: the source names
  both as single decoders but gives no program for them. The sizes of these
  two in the top, 24 and 30 bits, are likewise this design's choice. So
  are the window offsets of the double and triple forms and the rule that
  picks an E6 for each unit. The source gives only the 16-clock result of
  the double form, which this design reproduces.
* **Hybrid variants not built.** E4, E9 and E13 in double or triple form
  are known only through a conversion-time table. That table is not
  reproduced, and the clock counts here are not compared with it. Shifting
  several bits per clock with a barrel-type shifter is only suggested by
  the source and is not built.
* **Feed-back set rule.** Bit `n` is restored on LOW at the following stage,
  which is the rule of the logic equation `B_N = /E_N + E_(N+1)*L` and of the
  worked example. Restoring it on HIGH instead does not converge.
* **Additions of this design.** The `ovf` flag, the start/busy/done
  handshakes, the resets and the value 0 for undefined memory codes.
* **Not built.** The companion BCD-to-binary units E7 and E11 are known only
  by name and size. Delays (the 50 ns per unit in the source's timing tables)
  are not modelled; the lattices are plain combinational logic.

## Simulating

Each block has a testbench `tb/<module>_tb.sv` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/bcd_pkg.sv \
    tb/bcd_conv_top_tb.sv --top-module bcd_conv_top_tb
./obj_dir/Vbcd_conv_top_tb
```

`-Wno-fatal` keeps two kinds of warning from stopping the build. The
lattices hold each decade's bit stream in an ascending range (`[0:n]`, most
significant bit first), which Verilator reports as `ASCRANGE`. The
testbenches pass 32-bit counts to 64-bit check arguments, which it reports
as `WIDTHEXPAND`.

What the testbenches check:

* **Look-up units:** every line against a bit-serial model of the decade
  steps, plus the printed examples.
* **Static lattices:**
  * corner values and 20,000 random numbers at the default size;
  * an exhaustive 10- or 12-bit instance;
  * extra sizes: E9 with the other grouping and at 30 bits, E13 at 24 and
    42 bits.
* **`hybrid_conv`:**
  * all 4096 12-bit inputs, 30 clocks each, with 12 left shifts, 12 right
    shifts and 6 decodes;
  * the first register state of the 2967 example;
  * a 24-bit instance against the schedule length;
  * the E9 form: all 12-bit inputs in 26 clocks, with 2 full and 2 low
    decodes and 11 shifts each way, and random 30-bit numbers;
  * the E13 form: all 12-bit inputs in 19 clocks, with 1 full and 2 low
    decodes and 8 shifts each way, and random 30-bit numbers in 175 clocks;
  * the double and triple forms: all 12-bit inputs in 16 and 10 clocks,
    with every E6 in use; a 24-bit double form with a negative offset;
  * the E4 form: all 12-bit inputs in 54 clocks.
* **`feedback_bcd2bin`:** all 256 8-bit values, the 75 trace and clock count,
  overflow, and a 12-bit instance.
* **`bcd_conv_top_tb`:** runs everything at the default sizes. It checks:
  * the static lattices against each other;
  * the single and double E6 hybrid converters against the E6 lattice;
  * the E9 and E13 hybrid converters against the E9 and E13 lattices;
  * an 8-bit binary -> BCD -> binary round trip through the feed-back
    converter.

  It also counts every mechanism: left and right shifts, decode-loads,
  decodes on each E6 of the double form, E9 and E13 full and low decodes, HIGH steps, LOW restores, early ends on EVEN, runs
  to the last ring stage, and overflows.
