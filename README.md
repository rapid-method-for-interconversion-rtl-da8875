# Binary/decimal conversion with ROM decoding trees

This design converts between binary numbers and BCD (8-4-2-1 coded decimal)
numbers in pure combinational logic. It uses no microcode loop and no
sequential shift-and-correct circuit. Each converter is a two-dimensional
tree of identical small decoders, and each decoder is a 10-word by 4-bit
(40-bit) read-only memory. One row of decoders does one step of the
conversion algorithm. The conversion time is therefore one ROM access time
per row. There is no clock, no state and no handshake: the outputs follow the
inputs after the propagation delay of the tree.

Two trees are provided. They are independent, and the top module
`bcd_bin_converter` places them side by side:

| tree | algorithm | default size | decoders | rows (delay) |
|---|---|---|---|---|
| `dec2bin_tree` | repeated halving of the BCD number | 4 decimal digits in, 14 bits out | 23 | 11 |
| `bin2dec_tree` | repeated doubling of a BCD partial sum | 15 bits in, 5 decimal digits out | 29 | 12 |

With commercial ROMs of the era, these sizes were quoted at about 495 ns and
540 ns. Both figures work out to 45 ns per row, which shows that the delay is
set by the number of rows alone.

## The idea: arithmetic on BCD by rewiring plus a lookup

Halving and doubling are one-bit shifts in binary. A BCD number can be shifted
the same way, but the result is no longer valid BCD. A bit that crosses from
one decimal digit into the next changes weight by a factor of 10 instead of 2.
Each decoder repairs one digit after the shift. A tree of decoders therefore
does one halving or doubling per row, on all digits at once.

### Halving: the divide-by-2 decoder (`db_decoder`)

Shift a BCD digit right by one bit. Its upper three bits `X8 X4 X2` now give
`floor(digit/2)`. The low bit of the next higher digit drops in. Call that bit
`C1`: in the higher digit it was worth 10, so after halving it is worth 5. The
decoder forms the new digit:

    Y8 Y4 Y2 Y1 = 5*C1 + (4*X8 + 2*X4 + X2)        C1 in {0,1}, X in 0..4

Only 10 input combinations can occur, so the ROM has 10 words. It is addressed
as `C1*5 + X`. The six impossible addresses read `0000`.

### Doubling: the multiply-by-2 decoder (`bd_decoder`)

Double a BCD digit `X` (0..9) and the result is `2X = 10*C0 + 2*Y`, with
`Y` in 0..4. The decoder outputs the carry `C0` and `Y8 Y4 Y2`. In the
shifted number, `Y` becomes the upper three bits of the new digit. The low bit
of the new digit is the carry from the digit below, or for the units digit the
next binary input bit. The ROM word is `X` for `X < 5` and `X + 3` for `X >= 5`.
This is the familiar "add 3" correction, stored as a table.

## The decimal-to-binary tree

Start from `Q0 = N` and apply `Q(j-1) = 2*Q(j) + b(j-1)`. Each halving
yields one binary digit as its remainder, least significant first. In the
tree, row `l` holds one `db_decoder` per decimal column. It takes the
quotient digits of row `l-1` and produces the quotient digits of row `l`. The
bit shifted out of the units digit is binary digit `l-1`.

After `N-3` rows the quotient is below 8. The units digit then holds the three
most significant binary digits as they are, so the tree has `N-3` rows.

Not every grid position needs a decoder. A decoder whose `C1` is always 0
just shifts, so wiring replaces it. This happens in two cases:

* **Above the top.** A digit moves one bit to the right per row. After 4
  rows every digit above column `c` has drained, so column `c` needs decoders
  only in rows `l <= 4*(P-1-c)`. The top column never needs one.
* **Below the bottom.** The quotient entering row `l` is below `2^(N-l+1)`. Once
  that bound can no longer reach `10^(c+1)`, the digit above column `c` is
  0. This happens for `l > N-3-3c`.

The 4-digit tree (`D` = decoder, `.` = wire; column `d0` is the units):

    row   d3 d2 d1 d0
     1     .  D  D  D
     2-4   .  D  D  D
     5-8   .  .  D  D
     9-11  .  .  .  D          23 decoders, 11 rows

The count equals the closed form `M_db = 2p(p-1) - (4p-n-1)(4p-n)/2` whenever
`n >= 4p-3`. This covers every sensible width, for example 4 decoders for the
2-digit, 7-bit tree that converts 99 to 1100011. The testbench checks the
count against the formula.

**Input range.** The input must be valid BCD (every digit 0..9) and below
`2^N`. With the default `N = bits_for_digits(P)` every `P`-digit number
qualifies. If you set a smaller `N` (as in the 2-digit, 7-bit example),
inputs of `2^N` or more give undefined results. The pruning relies on this
range.

## The binary-to-decimal tree

The binary digits enter from the most significant end, and each one gives
`S <- 2*S + b` on a BCD partial sum. The first three bits form a value below
8, which is already a valid units digit, so the tree has `N-3` rows, one per
remaining bit. In row `l`, the `bd_decoder` of column `c` doubles digit `c`.
Its carry `C0` becomes the low bit of digit `c+1`, and binary digit
`N-3-l` becomes the low bit of the units digit.

A decoder is needed only where its digit can reach 5. Below 5 the table
returns its input with no carry. When row `l` is reached, `l+2` bits have
been taken in, so column `c` gets a decoder iff `2^(l+2) - 1 >= 5*10^c`. The
15-bit tree:

    row   d4 d3 d2 d1 d0
     1-3   .  .  .  .  D
     4-6   .  .  .  D  D
     7-10  .  .  D  D  D
    11-12  .  D  D  D  D       29 decoders, 12 rows

For `N` from 4 to 16 this equals the closed form
`M_bd = n(p-1) - (3/2)p(p-1) - int((n-4)/10)`. Examples are 7 decoders for the
8-bit tree (11111111 to 255) and 29 for 15 bits. From 17 bits up, the closed
form counts a few more decoders than are needed. The extra decoders would
only pass their input through, so this design leaves them out. The tree is
exact for every `N`, but its decoder count falls below the formula there.

## Modules and interfaces

| file | contents |
|---|---|
| `rtl/bcd_conv_pkg.sv` | ROM size, derived 45 ns access time, width helpers (`bits_for_digits`, `digits_for_bits`), the placement rules `db_present` / `bd_present`, decoder counts and the two closed-form counts |
| `rtl/db_decoder.sv` | divide-by-2 ROM: `c1_i`, `x_i[2:0]` -> `y_o[3:0]` |
| `rtl/bd_decoder.sv` | multiply-by-2 ROM: `x_i[3:0]` -> `c0_o`, `y_o[2:0]` |
| `rtl/dec2bin_tree.sv` | `#(P=4, N=bits_for_digits(P))`: `bcd_i[4P-1:0]` -> `bin_o[N-1:0]` |
| `rtl/bin2dec_tree.sv` | `#(N=15, P=digits_for_bits(N))`: `bin_i[N-1:0]` -> `bcd_o[4P-1:0]` |
| `rtl/bcd_bin_converter.sv` | top, `#(DEC_DIGITS=4, BIN_BITS=15)`: `dec_i[15:0]` -> `bin_o[13:0]`, `bin_i[14:0]` -> `dec_o[19:0]` |

In all BCD ports, digit 0 (the units) sits in bits `[3:0]`. In binary ports,
bit 0 is the least significant. Each tree exposes the elaboration-time
constants `LEVELS` (rows) and `NUM_DECODERS`. Each row is a generate block
`g_level[l]` that holds that row's digits, so a row's intermediate result can
be probed in simulation (for example `u_dec2bin.g_level[5].q`).

The ROMs are written as constant arrays indexed by the address. Synthesis
keeps them as 10 x 4 memories or turns them into logic, as it prefers.

## What comes from the source method and what is chosen here

These parts follow the method as published:

* the two decoder tables;
* the 40-bit ROM form of each decoder;
* the halving and doubling algorithms;
* `n-3` rows with one column per decimal digit;
* the decoder counts for the example and default sizes;
* the default sizes (4-digit decimal-to-binary, 15-bit binary-to-decimal);
* the absence of any clock.

These parts are choices of this design:

* **The placement rules.** The method gives the decoder counts as formulas
  but not the placement. The rules above reproduce the formulas in their
  stated range and remove only decoders that could never change a value.
* **Default widths.** The decimal-to-binary output is 14 bits and the
  binary-to-decimal output is 5 digits: just enough for 9999 and 32767.
* **Unused ROM addresses** read zero. No input checking or error flag is
  provided.
* **The 45 ns row delay.** It is derived from the two quoted conversion
  times and used only to check that the row counts agree with them. The RTL
  carries no delays.
* **The top module.** The two trees share nothing, and combining them in one
  top is only for convenience.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends with a
`TB_RESULT checks=... failures=...` line and has a watchdog.

* `tb_db_decoder`, `tb_bd_decoder`: all 16 addresses, compared with
  `5*C1 + X` and `2X = 10*C0 + 2Y`.
* `tb_dec2bin_tree`: every 4-, 3- and 2-digit number (the 2-digit tree is 7
  bits wide), compared with the integer the digits spell. The testbench also
  checks the decoder counts against `M_db` (23 and 4), the row count (11) and
  11 x 45 ns = 495 ns, and the 99 to 1100011 example.
* `tb_bin2dec_tree`: every 15-, 12- and 8-bit number, compared with the digits
  obtained by division by ten. The testbench also checks the decoder counts
  against `M_bd` (29 and 7), the row count (12) and 12 x 45 ns = 540 ns, and
  the 11111111 to 255 example.
* `tb_bcd_bin_converter`: the top at its default sizes. It converts all 10 000
  decimal inputs and all 32 768 binary inputs, and runs a round trip
  (binary to decimal to binary) for every value below 10 000. A reference
  replay of both algorithms counts how often a halving passes a remainder
  (`C1 = 1`) and how often a doubling produces a carry (`C0 = 1`). Both must
  occur. All of this runs in well under a second.

To simulate with Verilator, for example the top:

    verilator --binary --timing -Irtl rtl/bcd_conv_pkg.sv rtl/db_decoder.sv \
        rtl/bd_decoder.sv rtl/dec2bin_tree.sv rtl/bin2dec_tree.sv \
        rtl/bcd_bin_converter.sv tb/tb_bcd_bin_converter.sv \
        --top-module tb_bcd_bin_converter
    ./obj_dir/Vtb_bcd_bin_converter

The package must come first. To change the sizes, set `DEC_DIGITS` and
`BIN_BITS` on the top, or `P`/`N` on the trees. The port widths follow from
the parameters. The `dec2bin_tree` needs `N >= 4`, the `bin2dec_tree` needs
`N >= 4`, and the helper functions use 64-bit arithmetic, which limits
`P` to 18 digits and `N` to 63 bits.

Lint notes: `NUM_DECODERS` and the package's ROM delay are used only by the
testbenches. The carry out of the top decimal column of `bin2dec_tree` is
always 0 and is left unconnected.
