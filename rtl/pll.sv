// pll: behavioural model of the controller's phase-locked loop (not
// synthesizable: it stands for an analog or vendor clock macro).
//
// From the reference clock it produces clk at the reference frequency
// (133 MHz in the design) and clk2x at twice that frequency (266 MHz). The
// rising edges of clk2x coincide with both edges of clk, which is what the
// data path relies on. `locked` rises after LOCK_CYCLES reference clocks;
// the clocks run before that, as a real loop's output would while it
// settles. The frequencies follow the document; the lock behaviour and the
// way the doubled clock is modelled (a rising edge on each reference edge, a
// falling edge a quarter reference period later) are this model's choices.
// The DDR clock pair itself is made by adaptive_clock_gate from clk.
//
// Parameters: REF_PERIOD_NS is the reference period the model assumes for
// the quarter-period delay; a reference with a different period still gives
// correct edge positions for clk and the rising edges of clk2x.
`timescale 1ns / 1ps
module pll #(
  parameter realtime     REF_PERIOD_NS = 7.5,
  parameter int unsigned LOCK_CYCLES   = 16
) (
  input  logic ref_clk,
  input  logic rst_n,
  output logic clk,
  output logic clk2x,
  output logic locked
);

  int unsigned lock_cnt;

  initial begin
    clk      = 1'b0;
    clk2x    = 1'b0;
    locked   = 1'b0;
    lock_cnt = 0;
  end

  // clk and clk2x change in the same process so their coincident edges fall
  // in the same simulation step.
  always @(ref_clk) begin
    clk   <= ref_clk;
    clk2x <= 1'b1;
    #(REF_PERIOD_NS / 4.0);
    clk2x <= 1'b0;
  end

  always @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      lock_cnt <= 0;
      locked   <= 1'b0;
    end else if (lock_cnt < LOCK_CYCLES) begin
      lock_cnt <= lock_cnt + 1;
    end else begin
      locked <= 1'b1;
    end
  end

endmodule
