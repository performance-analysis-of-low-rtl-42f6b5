// init_fsm_tb: self-checking test of the initialisation state machine.
//
// The counter the machine relies on is modelled here independently. The
// test checks that the machine waits in I_IDLE while sys_dly_200us is low,
// then walks NOP, PRE, tRP, AR1, tRFC, AR2, tRFC, MRS, tMRD to READY with
// each wait state lasting its parameter in clocks, that sys_init_done is
// high only in READY, and that reset in the middle of the sequence sends the
// machine back to I_IDLE.
`timescale 1ns / 1ps
module init_fsm_tb;
  import ddr_pkg::*;

  localparam int TRP = 3, TRFC = 7, TMRD = 2, CW = 12;

  logic          clk = 0, rst_n = 0, dly = 0;
  logic          cnt_load, cnt_done;
  logic [CW-1:0] cnt_val, cnt = '0;
  istate_e       istate;
  logic          init_done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  init_fsm #(.TRP(TRP), .TRFC(TRFC), .TMRD(TMRD), .CW(CW)) dut (
    .clk, .rst_n, .sys_dly_200us(dly), .cnt_done, .cnt_load, .cnt_val, .istate,
    .sys_init_done(init_done)
  );

  // reference counter
  always_ff @(posedge clk) begin
    if (cnt_load)      cnt <= cnt_val;
    else if (cnt != 0) cnt <= cnt - 1'b1;
  end
  assign cnt_done = (cnt == 0);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("%t FAIL: %s", $realtime, msg); end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected sequence: state and clocks spent in it
  istate_e exp_s [10] = '{I_NOP, I_PRE, I_TRP, I_AR1, I_TRFC1, I_AR2, I_TRFC2, I_MRS, I_TMRD, I_READY};
  int      exp_n [10] = '{1, 1, TRP, 1, TRFC, 1, TRFC, 1, TMRD, 5};

  initial begin
    #12 rst_n = 1;
    repeat (10) begin
      @(negedge clk);
      check(istate == I_IDLE && !init_done, "waits in I_IDLE for sys_dly_200us");
    end
    dly = 1;
    @(negedge clk);
    for (int i = 0; i < 10; i++)
      for (int c = 0; c < exp_n[i]; c++) begin
        check(istate == exp_s[i], $sformatf("state %s, expected %s (clock %0d)",
                                            istate.name(), exp_s[i].name(), c));
        check(init_done == (exp_s[i] == I_READY), "sys_init_done only in READY");
        @(negedge clk);
      end
    // reset in the middle of the sequence
    rst_n = 0;
    @(negedge clk);
    check(istate == I_IDLE, "reset returns to I_IDLE");
    rst_n = 1;
    repeat (2 + TRP + 2) @(negedge clk);
    check(istate == I_TRFC1, $sformatf("restart reaches tRFC wait, in %s", istate.name()));
    rst_n = 0;
    #1;
    check(istate == I_IDLE && !init_done, "asynchronous reset from a wait state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
