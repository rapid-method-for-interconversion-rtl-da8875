// tb_bin2dec_tree: self-checking test of the binary-to-decimal decoding tree.
//
// Three trees are built: the default 15-bit one (5 decimal digits out), an
// 8-bit one (the 11111111 -> 255 example) and a 12-bit one. Every binary
// number each can take is applied and the BCD output is compared with the
// decimal digits of the number, formed here by division by ten. The structure
// is checked too: the number of decoders must match
// M_bd = n(p-1) - (3/2)p(p-1) - int((n-4)/10), there must be n-3 levels, and
// at 45 ns per decoder level the 15-bit tree must take the quoted 540 ns.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_bin2dec_tree;
  import bcd_conv_pkg::*;

  int unsigned checks = 0, failures = 0;

  logic [14:0] bin15;
  logic [19:0] bcd15;
  logic [7:0]  bin8;
  logic [11:0] bcd8;
  logic [11:0] bin12;
  logic [15:0] bcd12;

  bin2dec_tree             dut15 (.bin_i(bin15), .bcd_o(bcd15));
  bin2dec_tree #(.N(8))    dut8  (.bin_i(bin8),  .bcd_o(bcd8));
  bin2dec_tree #(.N(12))   dut12 (.bin_i(bin12), .bcd_o(bcd12));

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
      $display("FAIL: %s = %0h, expected %0h", what, got, expected);
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
    check("15-bit digits", dut15.P, 5);
    check("15-bit decoders", dut15.NUM_DECODERS, bd_formula(15, 5));
    check("15-bit levels", dut15.LEVELS, 12);
    check("15-bit delay ns", dut15.LEVELS * ROM_DELAY_NS, 540);
    check("8-bit decoders", dut8.NUM_DECODERS, bd_formula(8, 3));
    check("8-bit decoders (seven in the example)", dut8.NUM_DECODERS, 7);
    check("12-bit decoders", dut12.NUM_DECODERS, bd_formula(12, 4));

    // The worked example: 11111111 -> 255.
    bin8 = 8'b11111111;
    #1;
    check("255 in 8-bit tree", int'(bcd8), int'(12'h255));

    // Exhaustive.
    for (int unsigned v = 0; v < 32768; v++) begin
      bin15 = 15'(v);
      bin12 = 12'(v);
      bin8  = 8'(v);
      #1;
      check($sformatf("15-bit %0d", v), int'(bcd15), int'(to_bcd(v, 5)[19:0]));
      if (v < 4096) check($sformatf("12-bit %0d", v), int'(bcd12), int'(to_bcd(v, 4)[15:0]));
      if (v < 256)  check($sformatf("8-bit %0d", v),  int'(bcd8),  int'(to_bcd(v, 3)[11:0]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
