// tb_seq_dec_mult: self-checking test of the sequential multiplier core.
//
// Multiplies random 8-digit BCD operands, operands with every digit value in
// the multiplier, zero, one and the all-nines pair 99999999 x 99999999
// (= 9999999800000001), and compares the 16-digit product with the integer
// product. Checks that done rises exactly N_DIGITS cycles after the start
// edge and that the product holds after done. A watchdog ends a hung run as
// a failure.
module tb_seq_dec_mult;
  import tb_bcd_pkg::*;

  localparam int N = 8;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0][3:0]   x, y;
  logic                busy, done;
  logic [2*N-1:0][3:0] product;
  int checks = 0, failures = 0;

  seq_dec_mult #(.N_DIGITS(N)) dut (.clk, .rst_n, .start, .x, .y, .busy, .done, .product);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic multiply(bcd16_t xv, bcd16_t yv);
    longint unsigned exp;
    int cycles;
    @(negedge clk);
    x = (4*N)'(xv);
    y = (4*N)'(yv);
    start = 1;
    @(negedge clk);
    start = 0;
    x = (4*N)'(rand_bcd(N));   // operands may change once loaded
    y = (4*N)'(rand_bcd(N));
    cycles = 0;   // clock edges after the one that sampled start
    while (!done && cycles < 4 * N) begin
      @(negedge clk);
      cycles++;
    end
    exp = bcd2int(xv, N) * bcd2int(yv, N);
    checks++;
    if (bcd2int(64'(product), 2 * N) != exp) begin
      failures++;
      $display("FAIL %0d x %0d = %h, expected %0d", bcd2int(xv, N), bcd2int(yv, N), product, exp);
    end
    checks++;
    if (cycles != N) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", cycles, N);
    end
    @(negedge clk);
    checks++;
    if (bcd2int(64'(product), 2 * N) != exp || done) begin
      failures++;
      $display("FAIL product not held after done");
    end
  endtask

  initial begin
    x = '0;
    y = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    multiply(int2bcd(99999999), int2bcd(99999999));
    multiply(int2bcd(0), int2bcd(12345678));
    multiply(int2bcd(1), int2bcd(1));
    multiply(int2bcd(12345678), int2bcd(98765432));
    multiply(int2bcd(99999999), int2bcd(76543210));
    for (int d = 0; d < 10; d++) multiply(rand_bcd(N), int2bcd(longint'(d) * 11111111));
    for (int i = 0; i < 500; i++) multiply(rand_bcd(N), rand_bcd(N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
