// tb_product_reg: self-checking test of the accumulator/product shift register.
//
// After a clear it applies N random P[i+1] values with shift, some cycles
// with shift low, and compares p_shift and the 2N-digit product against a
// reference model: P is the last loaded value, the low register the lowest
// digits of the previously held values, newest on top. Also checks that clear
// has priority over shift. A watchdog ends a hung run as a failure.
module tb_product_reg;
  import tb_bcd_pkg::*;

  localparam int N = 8;

  logic clk = 0, rst_n = 0, clear = 0, shift = 0;
  logic [N:0][3:0]     p_next;
  logic [N-1:0][3:0]   p_shift;
  logic [2*N-1:0][3:0] product;
  int checks = 0, failures = 0;

  // Reference model.
  logic [N:0][3:0]   m_p;
  logic [N-2:0][3:0] m_low;

  product_reg #(.N_DIGITS(N)) dut (.clk, .rst_n, .clear, .shift, .p_next, .p_shift, .product);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (product !== {m_p, m_low} || p_shift !== m_p[N:1]) begin
      failures++;
      $display("FAIL product=%h expected %h p_shift=%h", product, {m_p, m_low}, p_shift);
    end
  endtask

  initial begin
    p_next = '0;
    m_p = '0;
    m_low = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 40; run++) begin
      @(negedge clk);
      clear = 1;
      shift = ($urandom_range(0, 1) == 1);
      p_next = (4*(N+1))'(rand_bcd(N + 1));
      @(negedge clk);
      clear = 0;
      m_p = '0;
      m_low = '0;
      compare();
      for (int i = 0; i < N; i++) begin
        shift = 1;
        p_next = (4*(N+1))'(rand_bcd(N + 1));
        @(negedge clk);
        m_low = {m_p[0], m_low[N-2:1]};
        m_p = p_next;
        compare();
        if ($urandom_range(0, 3) == 0) begin
          shift = 0;
          p_next = (4*(N+1))'(rand_bcd(N + 1));
          @(negedge clk);
          compare();
        end
      end
      shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
