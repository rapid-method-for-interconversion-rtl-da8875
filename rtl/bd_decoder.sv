// bd_decoder: multiply-by-2 decoder of the binary-to-decimal tree.
//
// Doubling a BCD digit X (0..9) gives 2X = 10*C0 + 2*Y, with Y = Y8 Y4 Y2 a
// value 0..4. The decoder gives C0, the carry into the next higher digit, and
// Y, which becomes the upper three bits of the new digit; its low bit is the
// carry C0 of the column below (or the next binary digit, in the units column).
// Equivalently, the output C0 Y8 Y4 Y2 is X for X < 5 and X + 3 for X >= 5.
// The function is held as a 10-word by 4-bit read-only memory addressed by the
// digit; the six addresses above 9 never occur and read 0000.
//
// Interface: x_i (X8 X4 X2 X1), c0_o (C0), y_o (Y8 Y4 Y2).
// Timing: purely combinational; one ROM access time from input to output.
// The table contents and the ROM form follow the design; the value of the
// unused addresses is this implementation's choice.
module bd_decoder
  import bcd_conv_pkg::*;
(
  input  logic [3:0] x_i,
  output logic       c0_o,
  output logic [2:0] y_o
);

  // ROM words C0 Y8 Y4 Y2 for X = 0..9.
  localparam logic [ROM_WIDTH-1:0] ROM [ROM_WORDS] = '{
    4'b0000, 4'b0001, 4'b0010, 4'b0011, 4'b0100,
    4'b1000, 4'b1001, 4'b1010, 4'b1011, 4'b1100
  };

  logic [3:0] word;

  always_comb begin
    if (x_i > 4'd9) word = 4'b0000;          // address not used
    else            word = ROM[x_i];
    c0_o = word[3];
    y_o  = word[2:0];
  end

endmodule
