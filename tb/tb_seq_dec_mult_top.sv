// tb_seq_dec_mult_top: end-to-end test of the bus-fed decimal multiplier.
//
// Runs the top at its default size (8-digit operands, no parameter override).
// Each operation puts A on the data bus with a start pulse and B in the next
// cycle, waits for done and compares the 16-digit product with the integer
// product. The first operation is 99999999 x 99999999 = 9999999800000001.
// Also checked: done comes N_DIGITS+1 clock edges after the start edge; the
// product holds after done; start pulses while busy are ignored; an operation
// may start in the cycle right after done. Counted and required at least
// once: every multiplier digit value 0..9 (each selects a different pair of
// easy multiples), an ignored start, a back-to-back start.
// A watchdog ends a hung run as a failure.
module tb_seq_dec_mult_top;
  import tb_bcd_pkg::*;

  localparam int N = sdm_pkg::N_DIGITS;

  logic clk = 0, rst_n = 0, start = 0;
  logic [4*N-1:0] data_bus;
  logic           busy, done;
  logic [8*N-1:0] product;
  int checks = 0, failures = 0;
  int digit_seen[10];
  int ignored_starts = 0, back_to_back = 0, paper_case = 0;

  seq_dec_mult_top dut (.clk, .rst_n, .start, .data_bus, .busy, .done, .product);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One operation. Returns with the clock at the negedge after done.
  // poke_busy: pulse start (with junk on the bus) during the iterations.
  task automatic multiply(bcd16_t av, bcd16_t bv, bit poke_busy);
    longint unsigned exp;
    int edges;
    for (int k = 0; k < N; k++) digit_seen[bv[4*k +: 4]]++;
    start = 1;
    data_bus = (4*N)'(av);
    @(negedge clk);
    start = 0;
    data_bus = (4*N)'(bv);
    edges = 0;
    check("busy after start", busy);
    @(negedge clk);
    edges++;
    while (!done && edges < 4 * N) begin
      data_bus = (4*N)'(rand_bcd(N));
      if (poke_busy && edges == 3) begin
        start = 1;
        ignored_starts++;
      end else start = 0;
      @(negedge clk);
      edges++;
    end
    start = 0;
    exp = bcd2int(av, N) * bcd2int(bv, N);
    check("product", bcd2int(product, 2 * N) == exp);
    if (bcd2int(product, 2 * N) != exp)
      $display("  %0d x %0d gave %h, expected %0d", bcd2int(av, N), bcd2int(bv, N), product, exp);
    check("latency", edges == N + 1);
    if (edges != N + 1) $display("  latency %0d edges, expected %0d", edges, N + 1);
    check("idle at done", !busy);
    if (bcd2int(av, N) == 99999999 && bcd2int(bv, N) == 99999999 &&
        product == 64'h9999999800000001) paper_case++;
  endtask

  initial begin
    data_bus = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);

    // The worked example: 99999999 x 99999999.
    multiply(int2bcd(99999999), int2bcd(99999999), 0);
    // Product must hold while idle.
    repeat (3) @(negedge clk);
    check("product held", bcd2int(product, 2 * N) == 64'd9999999800000001);
    check("done is a pulse", !done);

    // A start while busy must be ignored.
    multiply(int2bcd(12345678), int2bcd(87654321), 1);

    // Back to back: start in the cycle right after done.
    for (int i = 0; i < 20; i++) begin
      multiply(rand_bcd(N), rand_bcd(N), i % 2 == 0);
      back_to_back++;
    end

    // Every digit value in every multiplier position.
    for (int d = 0; d < 10; d++) multiply(rand_bcd(N), int2bcd(longint'(d) * 11111111), 0);
    for (int i = 0; i < 2000; i++) begin
      multiply(rand_bcd(N), rand_bcd(N), $urandom_range(0, 7) == 0);
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    multiply(int2bcd(0), int2bcd(99999999), 0);
    multiply(int2bcd(99999999), int2bcd(1), 0);

    for (int d = 0; d < 10; d++) begin
      check($sformatf("multiplier digit %0d used", d), digit_seen[d] > 0);
      $display("multiplier digit %0d: %0d times", d, digit_seen[d]);
    end
    check("start ignored while busy", ignored_starts > 0);
    check("back-to-back start", back_to_back > 0);
    check("99999999 x 99999999", paper_case == 1);
    $display("ignored starts: %0d, back-to-back operations: %0d", ignored_starts, back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
