// tb_bcd_x2: self-checking test of the carry-free BCD doubler.
//
// Drives every pair (digit, lower digit) into every digit position, then
// random 8-digit numbers and the all-nines word, and compares the output with
// 2*x computed in integer arithmetic. Each output digit must also be valid
// BCD. Purely combinational; a time-out ends a hung run as a failure.
module tb_bcd_x2;
  import tb_bcd_pkg::*;

  localparam int N = 8;

  logic [N-1:0][3:0] x;
  logic [N:0][3:0]   x2;
  int checks = 0, failures = 0;

  bcd_x2 #(.N_DIGITS(N)) dut (.x, .x2);

  task automatic check(bcd16_t xin);
    longint unsigned exp;
    x = xin[4*N-1:0];
    #1;
    exp = 2 * bcd2int(xin, N);
    checks++;
    if (bcd2int(64'(x2), N + 1) != exp || !bcd_valid(64'(x2), N + 1)) begin
      failures++;
      $display("FAIL x=%h x2=%h expected %0d", x, x2, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < N; p++)
      for (int d = 0; d < 10; d++)
        for (int l = 0; l < 10; l++) begin
          automatic bcd16_t v = '0;
          v[4*p +: 4] = 4'(d);
          if (p > 0) v[4*(p-1) +: 4] = 4'(l);
          check(v);
        end
    for (int i = 0; i < 2000; i++) check(rand_bcd(N));
    check(int2bcd(99999999));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
