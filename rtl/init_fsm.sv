// init_fsm: power-up initialisation state machine of the DDR SDRAM controller.
//
// After reset the machine waits in I_IDLE until sys_dly_200us reports that the
// 200 us clock-stabilisation time has passed. It then walks the DDR start-up
// sequence: one NOP state, PRECHARGE of all banks (I_PRE), a tRP wait, two
// AUTO REFRESH commands (I_AR1, I_AR2) each followed by a tRFC wait, the LOAD
// MODE REGISTER command (I_MRS) and a tMRD wait, and finally I_READY, where
// sys_init_done is high and the command state machine may run. The command
// to issue in each state is decoded from `istate` by the signal generator;
// the waits are timed by an external timing_counter (cnt_load/cnt_val/cnt_done).
//
// The sequence of states follows the document. The explicit tRP and tRFC wait
// states, whose lengths come from ddr_pkg, are this design's choice: the
// document only says the commands must find the banks idle.
//
// Timing: state register on the rising edge of clk; rst_n is active low and
// asynchronous, sending the machine to I_IDLE from any state.
`timescale 1ns / 1ps
module init_fsm
  import ddr_pkg::*;
#(
  parameter int unsigned TRP  = T_RP,
  parameter int unsigned TRFC = T_RFC,
  parameter int unsigned TMRD = T_MRD,
  parameter int unsigned CW   = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sys_dly_200us,
  input  logic          cnt_done,
  output logic          cnt_load,
  output logic [CW-1:0] cnt_val,
  output istate_e       istate,
  output logic          sys_init_done
);

  istate_e nxt;

  always_comb begin
    nxt      = istate;
    cnt_load = 1'b0;
    cnt_val  = '0;
    unique case (istate)
      I_IDLE:  if (sys_dly_200us) nxt = I_NOP;
      I_NOP:   nxt = I_PRE;
      I_PRE:   begin nxt = I_TRP;   cnt_load = 1'b1; cnt_val = CW'(TRP - 1);  end
      I_TRP:   if (cnt_done) nxt = I_AR1;
      I_AR1:   begin nxt = I_TRFC1; cnt_load = 1'b1; cnt_val = CW'(TRFC - 1); end
      I_TRFC1: if (cnt_done) nxt = I_AR2;
      I_AR2:   begin nxt = I_TRFC2; cnt_load = 1'b1; cnt_val = CW'(TRFC - 1); end
      I_TRFC2: if (cnt_done) nxt = I_MRS;
      I_MRS:   begin nxt = I_TMRD;  cnt_load = 1'b1; cnt_val = CW'(TMRD - 1); end
      I_TMRD:  if (cnt_done) nxt = I_READY;
      I_READY: nxt = I_READY;
      default: nxt = I_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) istate <= I_IDLE;
    else        istate <= nxt;
  end

  assign sys_init_done = (istate == I_READY);

endmodule
