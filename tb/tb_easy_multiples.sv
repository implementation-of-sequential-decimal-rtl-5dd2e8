// tb_easy_multiples: self-checking test of the X, 2X, 4X, 5X generator.
//
// Applies random 8-digit BCD multiplicands plus zero, all nines and each
// single digit repeated, and compares every multiple with k*X computed in
// integer arithmetic; all output digits must be valid BCD. Combinational;
// a time-out ends a hung run as a failure.
module tb_easy_multiples;
  import tb_bcd_pkg::*;

  localparam int N = 8;

  logic [N-1:0][3:0] x;
  logic [N:0][3:0]   x1, x2, x4, x5;
  int checks = 0, failures = 0;

  easy_multiples #(.N_DIGITS(N)) dut (.x, .x1, .x2, .x4, .x5);

  task automatic check_one(string name, logic [N:0][3:0] got, longint unsigned exp);
    checks++;
    if (bcd2int(64'(got), N + 1) != exp || !bcd_valid(64'(got), N + 1)) begin
      failures++;
      $display("FAIL %s x=%h got=%h expected %0d", name, x, got, exp);
    end
  endtask

  task automatic check(bcd16_t xin);
    longint unsigned xv;
    x = xin[4*N-1:0];
    #1;
    xv = bcd2int(xin, N);
    check_one("X",  x1, xv);
    check_one("2X", x2, 2 * xv);
    check_one("4X", x4, 4 * xv);
    check_one("5X", x5, 5 * xv);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    check(int2bcd(99999999));
    for (int d = 1; d < 10; d++) check(int2bcd(longint'(d) * 11111111));
    for (int i = 0; i < 2000; i++) check(rand_bcd(N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
