// pll_tb: self-checking test of the PLL model.
//
// With a 133 MHz reference (7.5 ns) it checks that clk has the reference
// period and half duty, that clk2x has half the period (266 MHz), that each
// rising edge of clk2x coincides with an edge of clk, and that `locked`
// rises after the lock count and drops with reset.
`timescale 1ns / 1ps
module pll_tb;

  localparam realtime TREF = 7.5;
  localparam int      LOCK = 16;

  logic ref_clk = 0, rst_n = 0;
  logic clk, clk2x, locked;
  int checks = 0, failures = 0;
  realtime clk_rise = -1, clk_fall = -1, x_rise = -1, last_clk_edge = -1;
  int n_clk = 0, n_x = 0, ref_rises = 0;

  always #(TREF / 2.0) ref_clk = ~ref_clk;
  always @(posedge ref_clk) ref_rises++;

  pll #(.REF_PERIOD_NS(TREF), .LOCK_CYCLES(LOCK)) dut (.ref_clk, .rst_n, .clk, .clk2x, .locked);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("%t FAIL: %s", $realtime, msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (clk_rise >= 0) begin
      check($realtime - clk_rise == TREF, "clk period 7.5 ns");
      n_clk++;
    end
    clk_rise = $realtime;
    last_clk_edge = $realtime;
  end
  always @(negedge clk) begin
    if (clk_rise >= 0) check($realtime - clk_rise == TREF / 2.0, "clk duty 50 %");
    last_clk_edge = $realtime;
  end
  always @(posedge clk2x) begin
    if (x_rise >= 0) begin
      check($realtime - x_rise == TREF / 2.0, "clk2x period 3.75 ns");
      n_x++;
    end
    x_rise = $realtime;
  end
  always @(negedge clk2x) begin
    check($realtime - x_rise == TREF / 4.0, "clk2x duty 50 %");
    check(last_clk_edge == x_rise, "clk2x rising edge coincides with a clk edge");
  end

  initial begin
    #(TREF * 3) rst_n = 1;
    ref_rises = 0;
    while (!locked) @(posedge ref_clk);
    check(ref_rises == LOCK + 1, $sformatf("locked after %0d reference clocks", ref_rises));
    repeat (200) @(posedge ref_clk);
    check(locked, "stays locked");
    rst_n = 0;
    #1 check(!locked, "reset drops lock");
    check(n_clk > 100 && n_x > 2 * n_clk - 4, "both clocks ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
