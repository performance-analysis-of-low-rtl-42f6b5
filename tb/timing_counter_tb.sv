// timing_counter_tb: self-checking test of the wait/burst down counter.
//
// Loads random values and checks, clock by clock against an independent
// count, that `count` runs down by one per clock, holds at zero, that `done`
// is high exactly while it is zero, that a load overrides the count at any
// time, and that a wait of N clocks (load N-1) ends after exactly N clocks.
`timescale 1ns / 1ps
module timing_counter_tb;

  localparam int W = 12;

  logic         clk = 0, rst_n = 0, load = 0;
  logic [W-1:0] load_val = '0, count;
  logic         done;
  int checks = 0, failures = 0;
  int exp_cnt = 0;

  always #5 clk = ~clk;

  timing_counter #(.WIDTH(W)) dut (.clk, .rst_n, .load, .load_val, .count, .done);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("%t FAIL: %s", $realtime, msg); end
  endtask

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, waited;
    #12 rst_n = 1;
    check(count == 0 && done, "reset clears the count");
    // random loads, sometimes before the count reaches zero
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      n = $urandom_range(0, 20);
      load = 1; load_val = W'(n);
      @(negedge clk);
      load = 0;
      exp_cnt = n;
      for (int c = 0; c < $urandom_range(1, 25); c++) begin
        check(int'(count) == exp_cnt, $sformatf("count %0d, expected %0d", count, exp_cnt));
        check(done == (exp_cnt == 0), "done flag");
        @(negedge clk);
        if (exp_cnt > 0) exp_cnt--;
      end
    end
    // a wait state of N clocks: load N-1, leave when done
    for (int N = 1; N <= 12; N++) begin
      @(negedge clk);
      load = 1; load_val = W'(N - 1);
      @(negedge clk);
      load = 0;
      waited = 1;
      while (!done) begin @(negedge clk); waited++; end
      check(waited == N, $sformatf("wait of %0d clocks took %0d", N, waited));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
