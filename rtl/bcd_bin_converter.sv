// bcd_bin_converter: binary/decimal interconversion unit.
//
// Two independent combinational decoding trees side by side:
//  * a decimal-to-binary tree (dec2bin_tree) that halves a DEC_DIGITS-digit
//    BCD number once per level and collects the remainders as binary digits;
//  * a binary-to-decimal tree (bin2dec_tree) that doubles a BCD partial sum
//    once per level while taking in the binary digits from the top down.
// Both are built from one kind of part, a 10-word by 4-bit ROM decoder, and
// their delay is one ROM access per level.
// With the defaults (a 4-digit decimal-to-binary tree and a 15-bit
// binary-to-decimal tree) the trees hold 23 and 29 decoders and are 11 and 12
// decoders deep.
//
// Interface: dec_i (BCD, units digit in bits [3:0]) -> bin_o;
//            bin_i -> dec_o (BCD, units digit in bits [3:0]).
// Timing: no clock and no state; outputs follow inputs after the tree delay.
// The two trees and their default sizes follow the design; placing them in
// one unit with separate ports is this implementation's choice.
module bcd_bin_converter
  import bcd_conv_pkg::*;
#(
  parameter int unsigned DEC_DIGITS = 4,
  parameter int unsigned BIN_BITS   = 15
) (
  input  logic [4*DEC_DIGITS-1:0]                dec_i,
  output logic [bits_for_digits(DEC_DIGITS)-1:0] bin_o,
  input  logic [BIN_BITS-1:0]                    bin_i,
  output logic [4*digits_for_bits(BIN_BITS)-1:0] dec_o
);

  dec2bin_tree #(.P(DEC_DIGITS)) u_dec2bin (
    .bcd_i (dec_i),
    .bin_o (bin_o)
  );

  bin2dec_tree #(.N(BIN_BITS)) u_bin2dec (
    .bin_i (bin_i),
    .bcd_o (dec_o)
  );

endmodule
