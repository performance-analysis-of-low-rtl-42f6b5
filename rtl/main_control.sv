// main_control: main control module of the DDR SDRAM controller.
//
// Holds the two state machines of the controller and their counters:
//   init_fsm     power-up sequence, produces `istate` and sys_init_done;
//   command_fsm  read/write/refresh sequencing, produces `cstate`;
//   two timing_counter instances, one per state machine (waits and burst
//   count);
//   a refresh timer that raises ref_req every TREFI clocks once
//   initialisation is done and drops it when the command machine issues
//   AUTO REFRESH.
// It also produces clk_en, the activity signal that drives the adaptive clock
// gate of the DDR clock: high while initialisation runs, while the command
// machine is away from C_IDLE, and as soon as a request or a refresh is
// pending, so the DDR clock is running before the first command of an access.
//
// The split into two state machines and a counter follows the document; the
// refresh timer and the clk_en rule are this design's choices.
// Timing: everything on the rising edge of clk, rst_n asynchronous active low.
`timescale 1ns / 1ps
module main_control
  import ddr_pkg::*;
#(
  parameter int unsigned TRP   = T_RP,
  parameter int unsigned TRCD  = T_RCD,
  parameter int unsigned TRFC  = T_RFC,
  parameter int unsigned TMRD  = T_MRD,
  parameter int unsigned TWR   = T_WR,
  parameter int unsigned TREFI = T_REFI,
  parameter int unsigned CL    = CAS_LAT,
  parameter int unsigned BL    = BURST_LEN
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              sys_dly_200us,
  input  logic              sys_req,
  input  logic              sys_r_wn,
  input  logic [ADDR_W-1:0] sys_addr,
  output logic              sys_ready,
  output logic              sys_wdata_req,
  output logic              sys_cyc_end,
  output logic              sys_init_done,
  output istate_e           istate,
  output cstate_e           cstate,
  output sys_addr_t         req_addr,
  output logic              ref_req,
  output logic              clk_en
);

  localparam int unsigned CW = 12;

  logic          i_load, c_load, i_done, c_done, ref_ack, req_r_wn;
  logic [CW-1:0] i_val, c_val, i_count, c_count;
  logic [$clog2(TREFI+1)-1:0] ref_cnt;

  init_fsm #(.TRP(TRP), .TRFC(TRFC), .TMRD(TMRD), .CW(CW)) u_init (
    .clk, .rst_n, .sys_dly_200us,
    .cnt_done(i_done), .cnt_load(i_load), .cnt_val(i_val),
    .istate, .sys_init_done
  );

  timing_counter #(.WIDTH(CW)) u_icnt (
    .clk, .rst_n, .load(i_load), .load_val(i_val), .count(i_count), .done(i_done)
  );

  command_fsm #(.TRCD(TRCD), .CL(CL), .BL(BL), .TDAL(TWR + TRP), .TRFC(TRFC), .CW(CW)) u_cmd (
    .clk, .rst_n, .init_done(sys_init_done),
    .sys_req, .sys_r_wn, .sys_addr, .sys_ready, .sys_wdata_req, .sys_cyc_end,
    .ref_req, .ref_ack,
    .cnt_done(c_done), .cnt_load(c_load), .cnt_val(c_val),
    .cstate, .req_addr, .req_r_wn
  );

  timing_counter #(.WIDTH(CW)) u_ccnt (
    .clk, .rst_n, .load(c_load), .load_val(c_val), .count(c_count), .done(c_done)
  );

  // Refresh timer: one AUTO REFRESH request every TREFI clocks.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_cnt <= '0;
      ref_req <= 1'b0;
    end else if (sys_init_done) begin
      if (ref_cnt == $bits(ref_cnt)'(TREFI - 1)) begin
        ref_cnt <= '0;
        ref_req <= 1'b1;
      end else begin
        ref_cnt <= ref_cnt + 1'b1;
        if (ref_ack) ref_req <= 1'b0;
      end
    end
  end

  assign clk_en = (sys_dly_200us && !sys_init_done) || (cstate != C_IDLE) ||
                  sys_req || ref_req;

endmodule
