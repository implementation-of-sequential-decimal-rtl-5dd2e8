// tb_bcd_pkg: reference arithmetic for the decimal multiplier testbenches.
//
// Converts between BCD 8421 vectors (up to 16 digits, digit 0 in bits 3:0)
// and 64-bit integers, draws random BCD numbers with $urandom, and checks
// that every digit of a vector is a valid BCD code. The testbenches compute
// expected results with ordinary integer arithmetic through these functions,
// independently of the digit logic under test.
package tb_bcd_pkg;

  typedef logic [63:0] bcd16_t;

  function automatic longint unsigned bcd2int(bcd16_t b, int nd);
    longint unsigned v = 0;
    for (int k = nd - 1; k >= 0; k--) v = v * 10 + longint'(b[4*k +: 4]);
    return v;
  endfunction

  function automatic bcd16_t int2bcd(longint unsigned v);
    bcd16_t b = '0;
    for (int k = 0; k < 16; k++) begin
      b[4*k +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return b;
  endfunction

  function automatic bcd16_t rand_bcd(int nd);
    bcd16_t b = '0;
    for (int k = 0; k < nd; k++) b[4*k +: 4] = 4'($urandom_range(0, 9));
    return b;
  endfunction

  function automatic bit bcd_valid(bcd16_t b, int nd);
    for (int k = 0; k < nd; k++) if (b[4*k +: 4] > 4'd9) return 1'b0;
    return 1'b1;
  endfunction

  function automatic longint unsigned pow10(int n);
    longint unsigned p = 1;
    for (int k = 0; k < n; k++) p = p * 10;
    return p;
  endfunction

endpackage
