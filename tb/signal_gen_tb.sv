// signal_gen_tb: self-checking test of the DDR command/address generator.
//
// Drives every initialisation and command state with random request
// addresses and checks, one clock later, the registered command lines
// {cs_n, ras_n, cas_n, we_n} against the standard DDR truth table, the bank
// and address lines (row for ACTIVE, column with A10 set for READ/WRITE,
// A10 set for PRECHARGE all, the mode word for BL 8 / CAS latency 2 for
// LOAD MODE), and the CKE behaviour.
`timescale 1ns / 1ps
module signal_gen_tb;
  import ddr_pkg::*;

  logic             clk = 0, rst_n = 0;
  istate_e          istate = I_IDLE;
  cstate_e          cstate = C_IDLE;
  sys_addr_t        req_addr = '0;
  logic             cke, csn, rasn, casn, wen;
  logic [BA_W-1:0]  ba;
  logic [ROW_W-1:0] ad;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  signal_gen dut (
    .clk, .rst_n, .istate, .cstate, .req_addr,
    .ddr_cke(cke), .ddr_csn(csn), .ddr_rasn(rasn), .ddr_casn(casn), .ddr_wen(wen),
    .ddr_ba(ba), .ddr_ad(ad)
  );

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

  // apply a state pair, wait one clock, compare
  task automatic apply(istate_e i, cstate_e c, logic [3:0] cmd,
                       logic [BA_W-1:0] eba, logic [ROW_W-1:0] ead, bit chk_addr);
    istate = i; cstate = c;
    @(negedge clk);
    check({csn, rasn, casn, wen} == cmd,
          $sformatf("%s/%s: command %b, expected %b", i.name(), c.name(), {csn, rasn, casn, wen}, cmd));
    if (chk_addr) begin
      check(ba == eba, $sformatf("%s/%s: bank %0d, expected %0d", i.name(), c.name(), ba, eba));
      check(ad == ead, $sformatf("%s/%s: ad %h, expected %h", i.name(), c.name(), ad, ead));
    end
  endtask

  initial begin
    #12;
    check(cke == 0 && {csn, rasn, casn, wen} == 4'b1111, "reset: CKE low, deselected");
    rst_n = 1;
    @(negedge clk);
    apply(I_IDLE, C_IDLE, 4'b1111, 0, 0, 0);
    check(cke == 0, "CKE low before initialisation");
    apply(I_NOP,   C_IDLE, 4'b0111, 0, 0, 0);
    check(cke == 1, "CKE high from the first NOP");
    apply(I_PRE,   C_IDLE, 4'b0010, 0, 12'h400, 1);
    apply(I_TRP,   C_IDLE, 4'b0111, 0, 0, 0);
    apply(I_AR1,   C_IDLE, 4'b0001, 0, 0, 0);
    apply(I_TRFC1, C_IDLE, 4'b0111, 0, 0, 0);
    apply(I_AR2,   C_IDLE, 4'b0001, 0, 0, 0);
    apply(I_MRS,   C_IDLE, 4'b0000, 0, 12'h023, 1);   // BL 8, sequential, CL 2
    apply(I_TMRD,  C_IDLE, 4'b0111, 0, 0, 0);
    for (int k = 0; k < 50; k++) begin
      req_addr = sys_addr_t'($urandom);
      apply(I_READY, C_IDLE,   4'b0111, 0, 0, 0);
      apply(I_READY, C_ACTIVE, 4'b0011, req_addr.bank, req_addr.row, 1);
      apply(I_READY, C_TRCD,   4'b0111, 0, 0, 0);
      apply(I_READY, C_READA,  4'b0101, req_addr.bank, {4'b0100, req_addr.col}, 1);
      apply(I_READY, C_CL,     4'b0111, 0, 0, 0);
      apply(I_READY, C_RDATA,  4'b0111, 0, 0, 0);
      apply(I_READY, C_WRITEA, 4'b0100, req_addr.bank, {4'b0100, req_addr.col}, 1);
      apply(I_READY, C_WDATA,  4'b0111, 0, 0, 0);
      apply(I_READY, C_TDAL,   4'b0111, 0, 0, 0);
      apply(I_READY, C_AR,     4'b0001, 0, 0, 0);
      apply(I_READY, C_TRFC,   4'b0111, 0, 0, 0);
      check(cke == 1, "CKE stays high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
