// adaptive_clock_gate_tb: self-checking test of the DDR clock gate.
//
// `en` is changed 2 ns after each rising edge of clk (10 ns) in random runs.
// Expected behaviour, worked out from the specification of the gate: the
// DDR clock has a rising edge at the start of clock m+1 exactly when `en`
// was high during clock m or clock m-1 (the XOR term keeps it one clock
// longer after `en` falls); gated_clk is the XOR of `en` in this clock and
// the previous one; ddr_clkn is always the complement of ddr_clk; every
// ddr_clk pulse is a full half period (no glitches).
`timescale 1ns / 1ps
module adaptive_clock_gate_tb;

  logic clk = 0, rst_n = 0, en = 0;
  logic gated_clk, gate_q, ddr_clk, ddr_clkn;
  int checks = 0, failures = 0;
  int pulses = 0, stopped = 0;
  realtime rise_t;

  always #5 clk = ~clk;

  adaptive_clock_gate dut (.clk, .rst_n, .en, .gated_clk, .gate_q, .ddr_clk, .ddr_clkn);

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

  always @(posedge ddr_clk) begin pulses++; rise_t = $realtime; end
  always @(negedge ddr_clk) if (rst_n) check($realtime - rise_t == 5.0, "full-width ddr_clk pulse");
  always @(ddr_clk or ddr_clkn) #0.1 check(ddr_clkn == !ddr_clk, "ddr_clkn is the complement");

  initial begin
    bit v_prev, v_cur;
    v_prev = 0;
    v_cur  = 0;
    #3;
    check(!ddr_clk && ddr_clkn, "clock stopped in reset");
    rst_n = 1;
    for (int m = 0; m < 600; m++) begin
      @(posedge clk);
      #1;
      // rising edge just seen: expected when en was high in either of the two clocks before
      if (m >= 2) begin
        check(ddr_clk == (v_cur || v_prev), $sformatf("clock %0d: ddr_clk %b", m, ddr_clk));
        if (!ddr_clk) stopped++;
      end
      #1;
      v_prev = v_cur;
      if ($urandom_range(0, 7) == 0) en = !en;
      v_cur = en;
      #1 check(gated_clk == (v_cur ^ v_prev), "gated_clk is the XOR of en and its copy");
    end
    check(pulses > 0 && stopped > 0, "clock both ran and stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
