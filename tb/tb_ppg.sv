// tb_ppg: self-checking test of the partial product generator.
//
// The multiples X, 2X, 4X, 5X are supplied from integer arithmetic, not from
// the easy-multiple logic. For every multiplier digit 0..9 and many random
// multiplicands, U + V must equal digit * X, and U and V must each be valid
// BCD. Combinational; a time-out ends a hung run as a failure.
module tb_ppg;
  import tb_bcd_pkg::*;

  localparam int N = 8;

  logic [N:0][3:0] x1, x2, x4, x5, u, v;
  logic [3:0]      yi;
  int checks = 0, failures = 0;

  ppg #(.N_DIGITS(N)) dut (.x1, .x2, .x4, .x5, .yi, .u, .v);

  task automatic check(bcd16_t xin, int d);
    longint unsigned xv, exp, got;
    xv = bcd2int(xin, N);
    x1 = (4*(N+1))'(xin);
    x2 = (4*(N+1))'(int2bcd(2 * xv));
    x4 = (4*(N+1))'(int2bcd(4 * xv));
    x5 = (4*(N+1))'(int2bcd(5 * xv));
    yi = 4'(d);
    #1;
    exp = longint'(d) * xv;
    got = bcd2int(64'(u), N + 1) + bcd2int(64'(v), N + 1);
    checks++;
    if (got != exp || !bcd_valid(64'(u), N + 1) || !bcd_valid(64'(v), N + 1)) begin
      failures++;
      $display("FAIL y=%0d x=%0d u=%h v=%h sum=%0d expected %0d", d, xv, u, v, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 10; d++) begin
      check(int2bcd(99999999), d);
      check(int2bcd(1), d);
      for (int i = 0; i < 200; i++) check(rand_bcd(N), d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
