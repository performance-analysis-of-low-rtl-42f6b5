// ddr_sdram_ctrl: low-power DDR SDRAM controller, top level.
//
// A bus master issues single-burst reads and writes of four 128-bit words
// (BURST_LEN = 8 beats of 64 bits) to a four-bank DDR SDRAM. The controller
// is built from
//   pll                  clk (133 MHz) and clk2x (266 MHz) from ref_clk
//   main_control         initialisation and command state machines, their
//                        counters and the refresh timer (istate, cstate)
//   signal_gen           DDR command/address bus from istate and cstate
//   data_path            128-bit <-> 64-bit double-data-rate transfer, DQS
//   adaptive_clock_gate  stops ddr_clk/ddr_clkn while the controller is idle
// The structure follows the document; the reset synchroniser, the request
// handshake and the split of the bidirectional DQ/DQS pins into separate
// output, enable and input ports (the pad buffers sit outside) are this
// design's choices.
//
// Bus master interface (synchronous to sys_clk = clk):
//   sys_dly_200us  high once the 200 us power-up wait is over
//   sys_init_done  high when the memory is initialised
//   sys_req/sys_ready  request handshake; sys_r_wn (1 read, 0 write) and
//                  sys_addr {bank[21:20], row[19:8], column[7:0]} are taken
//                  in the clock where both are high
//   sys_wdata_req  write data request: the master presents the next word of
//                  sys_wdata in the clock after each clock with it high
//   sys_rdata/sys_rd_valid  four read words, one per clock
//   sys_cyc_end    one-clock pulse when an access is complete
// Timing at the default values: the first read word is registered onto
// sys_rdata by the 5 + CAS_LAT-th rising edge after the edge that accepts
// the request (7 clocks), the other three follow on the next edges. A read
// keeps the controller busy for 8 + CAS_LAT clocks (10), a write for 11; a
// new request can be taken in the clock after sys_cyc_end.
// rst_n is asynchronous; the internal reset is held until the PLL locks and
// is released synchronously to clk by a two-flop synchroniser (whose output,
// a flop, drives the asynchronous resets of the blocks: lint reports it as
// flopped both synchronously and asynchronously, which is intended).
`timescale 1ns / 1ps
module ddr_sdram_ctrl
  import ddr_pkg::*;
#(
  parameter realtime REF_PERIOD_NS = 7.5
) (
  input  logic              ref_clk,
  input  logic              rst_n,
  output logic              sys_clk,
  // bus master
  input  logic              sys_dly_200us,
  output logic              sys_init_done,
  input  logic              sys_req,
  input  logic              sys_r_wn,
  input  logic [ADDR_W-1:0] sys_addr,
  output logic              sys_ready,
  input  logic [DATA_W-1:0] sys_wdata,
  output logic              sys_wdata_req,
  output logic [DATA_W-1:0] sys_rdata,
  output logic              sys_rd_valid,
  output logic              sys_cyc_end,
  // DDR SDRAM
  output logic              ddr_clk,
  output logic              ddr_clkn,
  output logic              ddr_cke,
  output logic              ddr_csn,
  output logic              ddr_rasn,
  output logic              ddr_casn,
  output logic              ddr_wen,
  output logic [BA_W-1:0]   ddr_ba,
  output logic [ROW_W-1:0]  ddr_ad,
  output logic [DQ_W-1:0]   ddr_dq_o,
  output logic              ddr_dq_en,
  input  logic [DQ_W-1:0]   ddr_dq_i,
  output logic              ddr_dqs_o,
  output logic              ddr_dqs_en
);

  logic      clk, clk2x, locked, clk_en, gated_clk, gate_q, ref_req;
  logic [1:0] rst_sync;
  logic      rst_i_n, rst_pll_n;
  istate_e   istate;
  cstate_e   cstate;
  sys_addr_t req_addr;

  pll #(.REF_PERIOD_NS(REF_PERIOD_NS)) u_pll (
    .ref_clk, .rst_n, .clk, .clk2x, .locked
  );

  assign sys_clk = clk;

  // Reset: asserted at once, released two clocks after rst_n is high and the PLL has locked.
  assign rst_pll_n = rst_n & locked;

  always_ff @(posedge clk or negedge rst_pll_n) begin
    if (!rst_pll_n) rst_sync <= '0;
    else            rst_sync <= {rst_sync[0], 1'b1};
  end
  assign rst_i_n = rst_sync[1];

  main_control u_main (
    .clk, .rst_n(rst_i_n), .sys_dly_200us,
    .sys_req, .sys_r_wn, .sys_addr, .sys_ready, .sys_wdata_req, .sys_cyc_end,
    .sys_init_done, .istate, .cstate, .req_addr, .ref_req, .clk_en
  );

  signal_gen u_sig (
    .clk, .rst_n(rst_i_n), .istate, .cstate, .req_addr,
    .ddr_cke, .ddr_csn, .ddr_rasn, .ddr_casn, .ddr_wen, .ddr_ba, .ddr_ad
  );

  data_path u_dp (
    .clk, .clk2x, .rst_n(rst_i_n), .cstate,
    .sys_wdata, .sys_rdata, .sys_rd_valid,
    .dq_o(ddr_dq_o), .dq_en(ddr_dq_en), .dq_i(ddr_dq_i),
    .dqs_o(ddr_dqs_o), .dqs_en(ddr_dqs_en)
  );

  adaptive_clock_gate u_cg (
    .clk, .rst_n(rst_i_n), .en(clk_en), .gated_clk, .gate_q, .ddr_clk, .ddr_clkn
  );

endmodule
