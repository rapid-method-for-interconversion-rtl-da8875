// tb_bcd_bin_converter: end-to-end test of the binary/decimal conversion unit
// at its default sizes (4 decimal digits in, 15 binary digits in).
//
// Every 4-digit decimal number is converted to binary and every 15-bit binary
// number to decimal; both results are compared with reference values made by
// ordinary integer arithmetic. Each decimal result below 10000 is also fed
// back through the decimal-to-binary tree, which must return the original
// number (round trip).
//
// The testbench also replays both algorithms step by step on the reference
// side to count how often the two corrections the decoders exist for occur:
// a halving in which a digit receives a remainder (C1 = 1) from the digit
// above, and a doubling in which a digit of 5 or more produces a carry
// (C0 = 1). Each counted event, and each kind of conversion, must occur at
// least once. A watchdog ends the run with a failure if it does not finish.
module tb_bcd_bin_converter;

  int unsigned checks = 0, failures = 0;
  int unsigned n_dec2bin = 0, n_bin2dec = 0, n_round_trip = 0;
  int unsigned n_c1_remainder = 0, n_c0_carry = 0;

  logic [15:0] dec_i;
  logic [13:0] bin_o;
  logic [14:0] bin_i;
  logic [19:0] dec_o;

  bcd_bin_converter dut (.dec_i(dec_i), .bin_o(bin_o), .bin_i(bin_i), .dec_o(dec_o));

  function automatic logic [19:0] to_bcd(int unsigned v);
    logic [19:0] r = '0;
    for (int unsigned i = 0; i < 5; i++) begin
      r[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return r;
  endfunction

  // Halvings of v (as a 4-digit decimal number) in which some digit other
  // than the top one receives a remainder from the digit above it.
  function automatic int unsigned count_remainders(int unsigned v);
    int unsigned k = 0;
    for (int unsigned j = 0; j < 11; j++) begin
      for (int unsigned c = 0; c < 3; c++)
        if (((v / (10 ** (c + 1))) % 10) % 2 == 1) k++;
      v = v / 2;
    end
    return k;
  endfunction

  // Doublings, while v is taken in bit by bit from the top, in which some
  // digit of the partial sum is 5 or more and so carries into the next.
  function automatic int unsigned count_carries(int unsigned v);
    int unsigned k = 0, s = 0;
    for (int i = 14; i >= 0; i--) begin
      for (int unsigned c = 0; c < 5; c++)
        if ((s / (10 ** c)) % 10 >= 5) k++;
      s = 2 * s + ((v >> i) & 1);
    end
    return k;
  endfunction

  task automatic check(string what, int got, int expected);
    checks++;
    if (got != expected) begin
      failures++;
      if (failures < 20) $display("FAIL: %s = %0h, expected %0h", what, got, expected);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dec_i = '0;
    bin_i = '0;

    // Decimal to binary, all 4-digit numbers.
    for (int unsigned v = 0; v < 10000; v++) begin
      dec_i = to_bcd(v)[15:0];
      #1;
      check($sformatf("dec2bin %0d", v), int'(bin_o), int'(v));
      n_dec2bin++;
      n_c1_remainder += count_remainders(v);
    end

    // Binary to decimal, all 15-bit numbers, with the round trip.
    for (int unsigned v = 0; v < 32768; v++) begin
      bin_i = 15'(v);
      #1;
      check($sformatf("bin2dec %0d", v), int'(dec_o), int'(to_bcd(v)));
      n_bin2dec++;
      n_c0_carry += count_carries(v);
      if (v < 10000) begin
        dec_i = dec_o[15:0];
        #1;
        check($sformatf("round trip %0d", v), int'(bin_o), int'(v));
        n_round_trip++;
      end
    end

    $display("events: dec2bin=%0d bin2dec=%0d round_trip=%0d c1_remainder=%0d c0_carry=%0d",
             n_dec2bin, n_bin2dec, n_round_trip, n_c1_remainder, n_c0_carry);
    checks += 5;
    if (n_dec2bin == 0)      failures++;
    if (n_bin2dec == 0)      failures++;
    if (n_round_trip == 0)   failures++;
    if (n_c1_remainder == 0) failures++;
    if (n_c0_carry == 0)     failures++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
