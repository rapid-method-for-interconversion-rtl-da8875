// bcd_conv_pkg: constants and elaboration-time functions shared by the
// binary/decimal decoding trees.
//
// Both converters are trees of identical 4-input, 4-output decoders, each a
// 10-word by 4-bit (40-bit) read-only memory. A tree is a grid of levels (one
// per binary digit beyond the first three) by decimal columns; the functions
// below decide, at elaboration, which grid positions hold a decoder and which
// are plain wiring because the decoder there would only ever see inputs it
// passes through unchanged. They also give the decoder counts that the two
// closed-form expressions for M_db and M_bd predict, so that testbenches can
// compare the built trees with them.
//
// Nothing here is clocked: both trees are combinational nets.
package bcd_conv_pkg;

  // Words and word width of one decoder ROM (10 x 4 = 40 bits).
  localparam int unsigned ROM_WORDS = 10;
  localparam int unsigned ROM_WIDTH = 4;

  // Propagation delay of one decoder ROM, in ns. The quoted conversion times
  // (540 ns for a 15-bit binary-to-decimal tree of 12 levels, 495 ns for a
  // 4-digit decimal-to-binary tree of 11 levels) both work out to 45 ns per
  // level; this figure is derived from them, not quoted.
  localparam int unsigned ROM_DELAY_NS = 45;

  // Smallest number of binary digits that holds every p-digit decimal number.
  function automatic int unsigned bits_for_digits(int unsigned p);
    longint unsigned v = 1;
    int unsigned     b = 0;
    for (int unsigned i = 0; i < p; i++) v = v * 10;
    v = v - 1;                       // 10^p - 1
    while (v != 0) begin
      v = v >> 1;
      b++;
    end
    return b;
  endfunction

  // Number of decimal digits of 2^n - 1.
  function automatic int unsigned digits_for_bits(int unsigned n);
    longint unsigned v = (longint'(1) << n) - 1;
    int unsigned     d = 0;
    do begin
      v = v / 10;
      d++;
    end while (v != 0);
    return d;
  endfunction

  // ---- decimal to binary ---------------------------------------------------
  // Level l (1..n-3) halves the decimal partial quotient Q(l-1). The decoder
  // of column c takes its C1 from the least significant bit of digit c+1.
  // That bit is always 0 (so the decoder is plain shifting) once
  //  * l > 4*(p-1-c): every digit above c has been shifted out, since each
  //    level moves a digit right by one bit and four moves empty it; or
  //  * l > n-3-3c: the quotient, below 2^(n-l+1), can no longer reach
  //    10^(c+1), using 2^3 < 10 for the first column and 2^3.32 ~ 10 beyond.
  function automatic bit db_present(int unsigned p, int unsigned n,
                                    int unsigned l, int unsigned c);
    if (c + 1 >= p) return 1'b0;             // top digit: C1 is always 0
    if (l > 4 * (p - 1 - c)) return 1'b0;
    if (int'(l) > int'(n) - 3 - 3 * int'(c)) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int unsigned db_count(int unsigned p, int unsigned n);
    int unsigned m = 0;
    for (int unsigned l = 1; l + 3 <= n; l++)
      for (int unsigned c = 0; c < p; c++)
        if (db_present(p, n, l, c)) m++;
    return m;
  endfunction

  // M_db = 2p(p-1) - (1/2)(4p-n-1)(4p-n), the closed form for the count.
  function automatic int db_formula(int p, int n);
    return 2 * p * (p - 1) - ((4 * p - n - 1) * (4 * p - n)) / 2;
  endfunction

  // ---- binary to decimal ---------------------------------------------------
  // Level l (1..n-3) doubles the partial sum S after l+2 binary digits have
  // been taken in, so S <= 2^(l+2) - 1. Column c needs a decoder only if its
  // digit can reach 5 there, that is if 2^(l+2) - 1 >= 5 * 10^c; below 5 the
  // decoder output equals its input and gives no carry.
  function automatic bit bd_present(int unsigned l, int unsigned c);
    longint unsigned lim = 5;
    for (int unsigned i = 0; i < c; i++) lim = lim * 10;
    return ((longint'(1) << (l + 2)) - 1) >= lim;
  endfunction

  function automatic int unsigned bd_count(int unsigned n, int unsigned p);
    int unsigned m = 0;
    for (int unsigned l = 1; l + 3 <= n; l++)
      for (int unsigned c = 0; c < p; c++)
        if (bd_present(l, c)) m++;
    return m;
  endfunction

  // M_bd = n(p-1) - (3/2)p(p-1) - int((n-4)/10), the closed form for the count.
  function automatic int bd_formula(int n, int p);
    return n * (p - 1) - (3 * p * (p - 1)) / 2 - (n - 4) / 10;
  endfunction

endpackage
