// command_fsm: read/write command state machine of the DDR SDRAM controller.
//
// Once initialisation is done the machine waits in C_IDLE for a bus-master
// request (sys_req with sys_ready). It latches the 22-bit address and the
// direction (sys_r_wn: 1 = read, 0 = write) and opens the row (C_ACTIVE),
// waits tRCD (C_TRCD) and then either
//   read : C_READA (READ with auto-precharge), C_CL for the CAS latency plus
//          the one-clock command register of the signal generator, C_RDATA
//          for the BURST_LEN/2 clocks in which 128-bit words reach the master;
//   write: C_WRITEA (WRITE with auto-precharge), C_WDATA for the BURST_LEN/2
//          clocks in which 128-bit words are taken from the master, C_TDAL
//          for write recovery plus precharge;
// and returns to C_IDLE, pulsing sys_cyc_end. A refresh request from the
// refresh timer has priority in C_IDLE: C_AR issues AUTO REFRESH (ref_ack)
// and C_TRFC waits tRFC. Waits are timed by an external timing_counter; the
// burst states use it as the burst counter.
//
// The read and write paths and their state names follow the document. The
// C_ACTIVE/C_TRCD, C_TDAL, C_AR/C_TRFC states, the request handshake
// (sys_req/sys_ready) and the write-data request are this design's choices.
//
// Write data handshake: sys_wdata_req is high one clock before each clock in
// which the data path takes sys_wdata; the master moves to the next 128-bit
// word on the rising edge that ends a clock with sys_wdata_req high.
// Timing: registered state on the rising edge of clk, rst_n asynchronous.
`timescale 1ns / 1ps
module command_fsm
  import ddr_pkg::*;
#(
  parameter int unsigned TRCD  = T_RCD,
  parameter int unsigned CL    = CAS_LAT,
  parameter int unsigned BL    = BURST_LEN,
  parameter int unsigned TDAL  = T_WR + T_RP,
  parameter int unsigned TRFC  = T_RFC,
  parameter int unsigned CW    = 12
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init_done,
  // bus master request
  input  logic              sys_req,
  input  logic              sys_r_wn,
  input  logic [ADDR_W-1:0] sys_addr,
  output logic              sys_ready,
  output logic              sys_wdata_req,
  output logic              sys_cyc_end,
  // refresh timer
  input  logic              ref_req,
  output logic              ref_ack,
  // counter
  input  logic              cnt_done,
  output logic              cnt_load,
  output logic [CW-1:0]     cnt_val,
  // to signal generation
  output cstate_e           cstate,
  output sys_addr_t         req_addr,
  output logic              req_r_wn
);

  cstate_e nxt;
  logic    accept;

  assign sys_ready = init_done && (cstate == C_IDLE) && !ref_req;
  assign accept    = sys_ready && sys_req;

  always_comb begin
    nxt         = cstate;
    cnt_load    = 1'b0;
    cnt_val     = '0;
    sys_cyc_end = 1'b0;
    ref_ack     = 1'b0;
    unique case (cstate)
      C_IDLE: begin
        if (init_done && ref_req) nxt = C_AR;
        else if (accept)          nxt = C_ACTIVE;
      end
      C_ACTIVE: begin nxt = C_TRCD; cnt_load = 1'b1; cnt_val = CW'(TRCD - 2); end
      C_TRCD:   if (cnt_done) nxt = req_r_wn ? C_READA : C_WRITEA;
      C_READA:  begin nxt = C_CL;   cnt_load = 1'b1; cnt_val = CW'(CL); end
      C_CL:     if (cnt_done) begin
                  nxt = C_RDATA; cnt_load = 1'b1; cnt_val = CW'(BL/2 - 1);
                end
      C_RDATA:  if (cnt_done) begin nxt = C_IDLE; sys_cyc_end = 1'b1; end
      C_WRITEA: begin nxt = C_WDATA; cnt_load = 1'b1; cnt_val = CW'(BL/2 - 1); end
      C_WDATA:  if (cnt_done) begin
                  nxt = C_TDAL; cnt_load = 1'b1; cnt_val = CW'(TDAL - 1);
                end
      C_TDAL:   if (cnt_done) begin nxt = C_IDLE; sys_cyc_end = 1'b1; end
      C_AR:     begin nxt = C_TRFC; cnt_load = 1'b1; cnt_val = CW'(TRFC - 1); ref_ack = 1'b1; end
      C_TRFC:   if (cnt_done) nxt = C_IDLE;
      default:  nxt = C_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cstate   <= C_IDLE;
      req_addr <= '0;
      req_r_wn <= 1'b1;
    end else begin
      cstate <= nxt;
      if (accept) begin
        req_addr <= sys_addr_t'(sys_addr);
        req_r_wn <= sys_r_wn;
      end
    end
  end

  assign sys_wdata_req = (cstate == C_WRITEA) || (cstate == C_WDATA && !cnt_done);

  // The ACTIVE-to-READ spacing is built from C_ACTIVE plus at least one C_TRCD clock.
  initial assert (TRCD >= 2) else $error("command_fsm: TRCD must be at least 2");

endmodule
