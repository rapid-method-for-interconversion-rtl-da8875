// dec2bin_tree: combinational decimal-to-binary converter built as a tree of
// divide-by-2 decoders (db_decoder).
//
// The algorithm is repeated halving: with Q0 = N, each step gives
// Q(j-1) = 2*Q(j) + b(j-1), so the remainders b0, b1, ... are the binary
// digits from the least significant up. On a BCD number, halving is a one-bit
// right shift of the whole digit string followed by a per-digit correction,
// which is what the decoders do: the decoder of column c takes the low bit of
// digit c+1 (C1) and the upper three bits of digit c, and gives digit c of the
// quotient. The bit shifted out of the units digit is the next binary digit.
//
// The tree has N-3 levels (one per binary digit except the last three) and a
// column per decimal digit. After the last level the quotient is below 8, so
// the units digit holds the three most significant binary digits directly.
// A grid position holds a decoder only where its C1 can be 1 (see
// bcd_conv_pkg::db_present); elsewhere the digit is just shifted right. For
// P = 4 this leaves 23 decoders, the count given by M_db = 2p(p-1) -
// (4p-n-1)(4p-n)/2.
//
// Parameters: P decimal digits in; N binary digits out, by default just
// enough for 10^P - 1. The input must be below 2^N and every digit at most 9.
// Interface: bcd_i (digit 0, the units, in bits [3:0]); bin_o.
// Timing: combinational; the longest path passes through N-3 decoders.
// bin_o[0] is wired straight from bcd_i[0]: a number and its units digit
// have the same parity, so the first remainder needs no decoder.
// Levels, columns and the decoder function follow the design; the exact
// pruning rule, port layout and default N are this implementation's choices.
module dec2bin_tree
  import bcd_conv_pkg::*;
#(
  parameter int unsigned P = 4,
  parameter int unsigned N = bits_for_digits(P)
) (
  input  logic [4*P-1:0] bcd_i,
  output logic [N-1:0]   bin_o
);

  localparam int unsigned LEVELS       = N - 3;
  localparam int unsigned NUM_DECODERS = db_count(P, N);

  // Each level holds digit c of the decimal quotient after l halvings in
  // g_level[l].q[c]; level 0 is the input.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_level
    logic [3:0] q [P];

    if (l == 0) begin : g_in
      for (genvar c = 0; c < P; c++) begin : g_col
        assign q[c] = bcd_i[4*c +: 4];
      end
    end else begin : g_halve
      // The remainder of this halving is the next binary digit.
      assign bin_o[l-1] = g_level[l-1].q[0][0];

      for (genvar c = 0; c < P; c++) begin : g_col
        if (db_present(P, N, l, c)) begin : g_dec
          db_decoder u_dec (
            .c1_i (g_level[l-1].q[c+1][0]),
            .x_i  (g_level[l-1].q[c][3:1]),
            .y_o  (q[c])
          );
        end else begin : g_shift
          // C1 is always 0 here: the decoder would only shift.
          assign q[c] = {1'b0, g_level[l-1].q[c][3:1]};
        end
      end
    end
  end

  // The final quotient is below 8: its bits are the top binary digits.
  assign bin_o[N-1:N-3] = g_level[LEVELS].q[0][2:0];

endmodule
