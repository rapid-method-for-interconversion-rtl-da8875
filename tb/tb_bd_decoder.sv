// tb_bd_decoder: exhaustive check of the multiply-by-2 decoder.
//
// Every digit 0..9 is applied and the outputs are compared with the doubling
// they stand for: 2X = 10*C0 + 2*Y. The unused addresses 10..15 must read 0.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_bd_decoder;

  logic [3:0] x;
  logic       c0;
  logic [2:0] y;
  int unsigned checks = 0, failures = 0;

  bd_decoder dut (.x_i(x), .c0_o(c0), .y_o(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int unsigned exp_c0, exp_y;
      x = 4'(v);
      #1;
      exp_c0 = (v <= 9 && 2 * v >= 10) ? 1 : 0;
      exp_y  = (v <= 9) ? ((2 * v) % 10) / 2 : 0;
      checks++;
      if (c0 !== 1'(exp_c0) || y !== 3'(exp_y)) begin
        failures++;
        $display("FAIL: X=%0d gives C0=%0d Y=%0d, expected C0=%0d Y=%0d",
                 v, c0, y, exp_c0, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
