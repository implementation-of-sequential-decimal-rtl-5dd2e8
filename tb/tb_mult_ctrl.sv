// tb_mult_ctrl: self-checking test of the iteration controller.
//
// Issues start pulses at random gaps, some of them while busy, and checks:
// load only in the start cycle when idle; step and busy for exactly N cycles
// after it; done for exactly one cycle right after the last step; start
// during busy has no effect. A watchdog ends a hung run as a failure.
module tb_mult_ctrl;

  localparam int N = 8;

  logic clk = 0, rst_n = 0, start = 0;
  logic load, step, busy, done;
  int checks = 0, failures = 0;
  int ignored_starts = 0;

  mult_ctrl #(.N_DIGITS(N)) dut (.clk, .rst_n, .start, .load, .step, .busy, .done);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_sig(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s = %b, expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int op = 0; op < 100; op++) begin
      // idle gap
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        expect_sig("busy idle", busy, 0);
        expect_sig("step idle", step, 0);
        expect_sig("load idle", load, 0);
      end
      start = 1;
      #1 expect_sig("load on start", load, 1);
      @(negedge clk) start = 0;
      for (int i = 0; i < N; i++) begin
        // optionally poke start during the run: it must be ignored
        start = ($urandom_range(0, 2) == 0);
        if (start) ignored_starts++;
        #1;
        expect_sig("step", step, 1);
        expect_sig("busy", busy, 1);
        expect_sig("load in run", load, 0);
        expect_sig("done in run", done, 0);
        @(negedge clk);
      end
      start = 0;
      #1;
      expect_sig("done after N steps", done, 1);
      expect_sig("busy after N steps", busy, 0);
      @(negedge clk);
      expect_sig("done one cycle", done, 0);
    end
    checks++;
    if (ignored_starts == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
