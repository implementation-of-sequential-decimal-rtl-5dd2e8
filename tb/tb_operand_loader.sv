// tb_operand_loader: self-checking test of the two-cycle operand transfer.
//
// Places A on the bus with a start pulse and B in the next cycle, and checks
// that go rises for exactly that next cycle with a = A and b = B; that start
// is ignored while enable is low; and that a start in the go cycle is not
// taken as a new operation. A watchdog ends a hung run as a failure.
module tb_operand_loader;
  import tb_bcd_pkg::*;

  localparam int N = 8;

  logic clk = 0, rst_n = 0, start = 0, enable = 1;
  logic [N-1:0][3:0] data_bus, a, b;
  logic go, loading;
  int checks = 0, failures = 0;

  operand_loader #(.N_DIGITS(N)) dut (.clk, .rst_n, .start, .enable, .data_bus, .go, .a, .b, .loading);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [4*N-1:0] got, logic [4*N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s = %h, expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    logic [4*N-1:0] av, bv;
    data_bus = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int op = 0; op < 200; op++) begin
      av = (4*N)'(rand_bcd(N));
      bv = (4*N)'(rand_bcd(N));
      @(negedge clk);
      enable = ($urandom_range(0, 3) != 0);
      start = 1;
      data_bus = av;
      #1 expect_eq("go in A cycle", 32'(go), 0);
      @(negedge clk);
      start = enable && ($urandom_range(0, 1) == 1);   // start again in the B cycle
      data_bus = bv;
      #1;
      if (enable) begin
        expect_eq("go in B cycle", 32'(go), 1);
        expect_eq("a", a, av);
        expect_eq("b", b, bv);
        @(negedge clk);
        start = 0;
        #1 expect_eq("go one cycle", 32'(go), 0);
      end else begin
        expect_eq("go while disabled", 32'(go), 0);
        expect_eq("loading while disabled", 32'(loading), 0);
        start = 0;
      end
      enable = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
