// db_decoder: divide-by-2 decoder of the decimal-to-binary tree.
//
// One BCD digit of a decimal number is halved by shifting it right one bit:
// the upper three bits X8 X4 X2 move down, and the least significant bit of
// the next higher digit (C1, worth ten, hence five after halving) comes in.
// The decoder turns that shifted, no longer BCD, pattern back into a BCD digit:
//     Y8 Y4 Y2 Y1 = 5*C1 + (4*X8 + 2*X4 + X2)
// The function is held as a 10-word by 4-bit read-only memory, one word per
// legal input (C1 = 0 or 1, X8 X4 X2 = 0..4). X8 X4 X2 never exceeds 4 since
// the digit it came from is at most 9; the six unused addresses read 0000.
//
// Interface: c1_i (C1), x_i (X8 X4 X2), y_o (Y8 Y4 Y2 Y1).
// Timing: purely combinational; one ROM access time from input to output.
// The table contents and the ROM form follow the design; the value of the
// unused addresses is this implementation's choice.
module db_decoder
  import bcd_conv_pkg::*;
(
  input  logic       c1_i,
  input  logic [2:0] x_i,
  output logic [3:0] y_o
);

  // ROM words in order of the legal addresses C1 X8 X4 X2 =
  // 0000, 0001, 0010, 0011, 0100, 1000, 1001, 1010, 1011, 1100.
  localparam logic [ROM_WIDTH-1:0] ROM [ROM_WORDS] = '{
    4'd0, 4'd1, 4'd2, 4'd3, 4'd4,
    4'd5, 4'd6, 4'd7, 4'd8, 4'd9
  };

  always_comb begin
    if (x_i > 3'd4) y_o = 4'd0;              // address not used
    else            y_o = ROM[c1_i ? 4'(x_i) + 4'd5 : 4'(x_i)];
  end

endmodule
