// tb_db_decoder: exhaustive check of the divide-by-2 decoder.
//
// Every legal input (C1 = 0/1, X8 X4 X2 = 0..4) is applied and the output is
// compared with the arithmetic it stands for, 5*C1 + X, computed here and not
// read from the decoder's table. The unused addresses are checked to read 0.
// A watchdog ends the run with a failure if it does not finish in time.
module tb_db_decoder;

  logic       c1;
  logic [2:0] x;
  logic [3:0] y;
  int unsigned checks = 0, failures = 0;

  db_decoder dut (.c1_i(c1), .x_i(x), .y_o(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) begin
      for (int v = 0; v < 8; v++) begin
        int unsigned expected;
        c1 = 1'(c);
        x  = 3'(v);
        #1;
        expected = (v <= 4) ? 5 * c + v : 0;
        checks++;
        if (y !== 4'(expected)) begin
          failures++;
          $display("FAIL: C1=%0d X=%0d gives %0d, expected %0d", c, v, y, expected);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
