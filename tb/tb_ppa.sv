// tb_ppa: self-checking test of the three-operand BCD accumulator adder.
//
// Drives 0.1*P (8 digits), U (below 5*10^8) and V (below 4*10^8), the ranges
// the multiplier produces, and compares the 9-digit result with the integer
// sum. Includes all-nines operands, which make every digit carry 2.
// Combinational; a time-out ends a hung run as a failure.
module tb_ppa;
  import tb_bcd_pkg::*;

  localparam int N = 8;

  logic [N-1:0][3:0] p_shift;
  logic [N:0][3:0]   u, v, p_next;
  int checks = 0, failures = 0;

  ppa #(.N_DIGITS(N)) dut (.p_shift, .u, .v, .p_next);

  task automatic check(longint unsigned pv, longint unsigned uv, longint unsigned vv);
    longint unsigned exp;
    p_shift = (4*N)'(int2bcd(pv));
    u       = (4*(N+1))'(int2bcd(uv));
    v       = (4*(N+1))'(int2bcd(vv));
    #1;
    exp = pv + uv + vv;
    checks++;
    if (bcd2int(64'(p_next), N + 1) != exp || !bcd_valid(64'(p_next), N + 1)) begin
      failures++;
      $display("FAIL p=%0d u=%0d v=%0d got %h expected %0d", pv, uv, vv, p_next, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0, 0);
    check(99999999, 499999995, 399999996);
    check(99999999, 99999999, 99999999);
    check(1, 99999999, 0);
    for (int i = 0; i < 3000; i++)
      check(bcd2int(rand_bcd(N), N),
            longint'($urandom_range(0, 499999999)),
            longint'($urandom_range(0, 399999999)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
