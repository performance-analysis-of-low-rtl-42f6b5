// signal_gen: signal generation module of the DDR SDRAM controller.
//
// Turns the state of the two state machines into the DDR command bus. Each
// state that issues a command is decoded into the standard command truth
// table {ddr_csn, ddr_rasn, ddr_casn, ddr_wen} and the matching bank and
// address lines:
//   I_PRE          PRECHARGE all banks (ddr_ad[10] = 1)
//   I_AR1, I_AR2   AUTO REFRESH
//   I_MRS          LOAD MODE REGISTER, ddr_ba = 0, ddr_ad = mode word
//                  (burst length BL, sequential, CAS latency CL)
//   C_ACTIVE       ACTIVE, ddr_ba = bank, ddr_ad = row
//   C_READA        READ with auto-precharge, ddr_ad = column, ddr_ad[10] = 1
//   C_WRITEA       WRITE with auto-precharge, as READ
//   C_AR           AUTO REFRESH
// Every other state gives NOP; before initialisation starts (I_IDLE) the
// device is deselected and ddr_cke is low. ddr_cke rises with the first NOP
// of the initialisation and stays high.
//
// That the module derives the DDR command and address signals from istate
// and cstate follows the document; the encoding, the auto-precharge policy
// and the CKE handling are this design's choices.
// Timing: all outputs are registered on the rising edge of clk, so a command
// appears on the bus one clock after its state and is taken by the memory at
// the next rising edge of ddr_clk. rst_n is asynchronous and active low.
`timescale 1ns / 1ps
module signal_gen
  import ddr_pkg::*;
#(
  parameter int unsigned BL = BURST_LEN,
  parameter int unsigned CL = CAS_LAT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  istate_e          istate,
  input  cstate_e          cstate,
  input  sys_addr_t        req_addr,
  output logic             ddr_cke,
  output logic             ddr_csn,
  output logic             ddr_rasn,
  output logic             ddr_casn,
  output logic             ddr_wen,
  output logic [BA_W-1:0]  ddr_ba,
  output logic [ROW_W-1:0] ddr_ad
);

  localparam logic [ROW_W-1:0] MODE = mode_word(BL, CL);

  ddr_cmd_e         cmd;
  logic [BA_W-1:0]  ba;
  logic [ROW_W-1:0] ad;

  always_comb begin
    cmd = CMD_NOP;
    ba  = '0;
    ad  = '0;
    if (istate != I_READY) begin
      unique case (istate)
        I_IDLE:       cmd = CMD_DESEL;
        I_PRE:        begin cmd = CMD_PRE; ad[10] = 1'b1; end
        I_AR1, I_AR2: cmd = CMD_AR;
        I_MRS:        begin cmd = CMD_LMR; ad = MODE; end
        default:      cmd = CMD_NOP;
      endcase
    end else begin
      unique case (cstate)
        C_ACTIVE: begin cmd = CMD_ACT;   ba = req_addr.bank; ad = req_addr.row; end
        C_READA:  begin
          cmd = CMD_READ;  ba = req_addr.bank;
          ad[COL_W-1:0] = req_addr.col; ad[10] = 1'b1;
        end
        C_WRITEA: begin
          cmd = CMD_WRITE; ba = req_addr.bank;
          ad[COL_W-1:0] = req_addr.col; ad[10] = 1'b1;
        end
        C_AR:     cmd = CMD_AR;
        default:  cmd = CMD_NOP;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {ddr_csn, ddr_rasn, ddr_casn, ddr_wen} <= CMD_DESEL;
      ddr_cke <= 1'b0;
      ddr_ba  <= '0;
      ddr_ad  <= '0;
    end else begin
      {ddr_csn, ddr_rasn, ddr_casn, ddr_wen} <= cmd;
      ddr_ba <= ba;
      ddr_ad <= ad;
      if (istate != I_IDLE) ddr_cke <= 1'b1;
    end
  end

endmodule
