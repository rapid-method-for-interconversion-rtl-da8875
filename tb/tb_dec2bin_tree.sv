// tb_dec2bin_tree: self-checking test of the decimal-to-binary decoding tree.
//
// Three trees are built: the default 4-digit one (14 binary digits out), a
// 2-digit one with 7 binary digits (the 99 -> 1100011 example) and a 3-digit
// one. Every decimal number each can take is applied in BCD, and the output
// is compared with the integer the BCD digits spell, formed here by ordinary
// arithmetic. The structure is checked too: the number of decoders must match
// M_db = 2p(p-1) - (4p-n-1)(4p-n)/2, there must be n-3 levels, and at 45 ns
// per decoder level the 4-digit tree must take the quoted 495 ns.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_dec2bin_tree;
  import bcd_conv_pkg::*;

  int unsigned checks = 0, failures = 0;

  logic [15:0] bcd4;
  logic [13:0] bin4;
  logic [7:0]  bcd2;
  logic [6:0]  bin2;
  logic [11:0] bcd3;
  logic [9:0]  bin3;

  dec2bin_tree               dut4 (.bcd_i(bcd4), .bin_o(bin4));
  dec2bin_tree #(.P(2), .N(7)) dut2 (.bcd_i(bcd2), .bin_o(bin2));
  dec2bin_tree #(.P(3))      dut3 (.bcd_i(bcd3), .bin_o(bin3));

  // BCD encoding of v in p digits, built digit by digit.
  function automatic logic [31:0] to_bcd(int unsigned v, int unsigned p);
    logic [31:0] r = '0;
    for (int unsigned i = 0; i < p; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  task automatic check(string what, int got, int expected);
    checks++;
    if (got != expected) begin
      failures++;
      $display("FAIL: %s = %0d, expected %0d", what, got, expected);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Structure.
    check("4-digit decoders", dut4.NUM_DECODERS, db_formula(4, 14));
    check("4-digit decoders (quoted value)", dut4.NUM_DECODERS, 23);
    check("4-digit levels", dut4.LEVELS, 11);
    check("4-digit delay ns", dut4.LEVELS * ROM_DELAY_NS, 495);
    check("2-digit decoders", dut2.NUM_DECODERS, db_formula(2, 7));
    check("2-digit decoders (four in the example)", dut2.NUM_DECODERS, 4);
    check("3-digit decoders", dut3.NUM_DECODERS, db_formula(3, 10));

    // The worked example: 99 -> 1100011.
    bcd2 = 8'h99;
    #1;
    check("99 in 2-digit tree", int'(bin2), int'(7'b1100011));

    // Exhaustive.
    for (int unsigned v = 0; v < 10000; v++) begin
      bcd4 = to_bcd(v, 4)[15:0];
      bcd3 = to_bcd(v % 1000, 3)[11:0];
      bcd2 = to_bcd(v % 100, 2)[7:0];
      #1;
      check($sformatf("4-digit %0d", v), int'(bin4), int'(v));
      if (v < 1000) check($sformatf("3-digit %0d", v), int'(bin3), int'(v));
      if (v < 100)  check($sformatf("2-digit %0d", v), int'(bin2), int'(v));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
