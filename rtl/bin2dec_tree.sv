// bin2dec_tree: combinational binary-to-decimal converter built as a tree of
// multiply-by-2 decoders (bd_decoder).
//
// The algorithm is repeated doubling: the binary digits are taken in from
// the most significant down, and each one gives S <- 2*S + b, with S kept in
// BCD. Doubling a BCD number digit by digit is done by the decoders: the
// decoder of column c gives the upper three bits of the doubled digit and the
// carry C0, which becomes the low bit of digit c+1; the low bit of the units
// digit is the incoming binary digit.
//
// The first three binary digits form a value below 8 that is already a BCD
// digit, so the tree has N-3 levels, one for each further binary digit, and a
// column per decimal digit of the result. A grid position holds a decoder only
// where the digit it sees can reach 5 (see bcd_conv_pkg::bd_present); below 5
// a decoder returns its input unchanged with no carry, so it is left out and
// the digit is wired through. For N = 15 this leaves 29 decoders, the count
// given by M_bd = n(p-1) - (3/2)p(p-1) - int((n-4)/10); the two agree for
// N up to 16, beyond which the closed form counts a few more decoders than
// are needed.
//
// Parameters: N binary digits in; P decimal digits out, by default the
// number of digits of 2^N - 1.
// Interface: bin_i; bcd_o (digit 0, the units, in bits [3:0]).
// Timing: combinational; the longest path passes through N-3 decoders.
// bcd_o[0] is wired straight from bin_i[0] (same parity), and bits of the
// top digit that 2^N - 1 cannot reach are constant 0 (for N = 15 the top
// digit is at most 3, so bcd_o[19:18] are always 0).
// Levels, columns and the decoder function follow the design; the pruning
// rule, port layout and default P are this implementation's choices.
module bin2dec_tree
  import bcd_conv_pkg::*;
#(
  parameter int unsigned N = 15,
  parameter int unsigned P = digits_for_bits(N)
) (
  input  logic [N-1:0]   bin_i,
  output logic [4*P-1:0] bcd_o
);

  localparam int unsigned LEVELS       = N - 3;
  localparam int unsigned NUM_DECODERS = bd_count(N, P);

  // g_level[l].s[c] is digit c of the decimal partial sum after level l,
  // that is after l+3 binary digits have been taken in; level 0 holds the
  // first three.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_level
    logic [3:0] s [P];

    if (l == 0) begin : g_in
      for (genvar c = 0; c < P; c++) begin : g_col
        if (c == 0) begin : g_units
          assign s[c] = {1'b0, bin_i[N-1:N-3]};
        end else begin : g_zero
          assign s[c] = 4'd0;
        end
      end
    end else begin : g_double
      // C0 of each column. The top column never holds a decoder (its digit
      // stays below 5 until the last level, or the result would not fit in
      // P digits), so carry[P-1] is always 0 and goes nowhere.
      logic [P-1:0] carry;
      logic [2:0]   hi [P];                  // Y8 Y4 Y2 of each column

      for (genvar c = 0; c < P; c++) begin : g_col
        if (bd_present(l, c)) begin : g_dec
          bd_decoder u_dec (
            .x_i  (g_level[l-1].s[c]),
            .c0_o (carry[c]),
            .y_o  (hi[c])
          );
        end else begin : g_wire
          // The digit is at most 4 here: doubling needs no correction.
          assign carry[c] = 1'b0;
          assign hi[c]    = g_level[l-1].s[c][2:0];
        end

        if (c == 0) begin : g_lsb
          assign s[c] = {hi[c], bin_i[N-3-l]};
        end else begin : g_lsb_carry
          assign s[c] = {hi[c], carry[c-1]};
        end
      end
    end
  end

  for (genvar c = 0; c < P; c++) begin : g_out
    assign bcd_o[4*c +: 4] = g_level[LEVELS].s[c];
  end

endmodule
