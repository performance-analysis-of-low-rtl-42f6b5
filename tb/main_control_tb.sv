// main_control_tb: self-checking test of the main control module.
//
// Checks, with shortened timing parameters:
//   * initialisation takes the expected number of clocks after
//     sys_dly_200us (NOP + PRE + tRP + 2 x (AR + tRFC) + MRS + tMRD);
//   * a read and a write walk the expected cstate sequence lengths;
//   * the refresh timer issues C_AR every TREFI clocks while idle and a
//     pending refresh blocks new requests;
//   * clk_en is high during initialisation, during accesses and as soon as a
//     request is pending, and low when everything is idle.
`timescale 1ns / 1ps
module main_control_tb;
  import ddr_pkg::*;

  localparam int TRP = 2, TRCD = 2, TRFC = 6, TMRD = 2, TWR = 2, TREFI = 60, CL = 2, BL = 8;

  logic              clk = 0, rst_n = 0, dly = 0;
  logic              sys_req = 0, sys_r_wn = 1;
  logic [ADDR_W-1:0] sys_addr = '0;
  logic              sys_ready, sys_wdata_req, sys_cyc_end, init_done, ref_req, clk_en;
  istate_e           istate;
  cstate_e           cstate;
  sys_addr_t         req_addr;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  main_control #(.TRP(TRP), .TRCD(TRCD), .TRFC(TRFC), .TMRD(TMRD), .TWR(TWR),
                 .TREFI(TREFI), .CL(CL), .BL(BL)) dut (
    .clk, .rst_n, .sys_dly_200us(dly), .sys_req, .sys_r_wn, .sys_addr, .sys_ready,
    .sys_wdata_req, .sys_cyc_end, .sys_init_done(init_done), .istate, .cstate,
    .req_addr, .ref_req, .clk_en
  );

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("%t FAIL: %s", $realtime, msg); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // refresh intervals seen while idle
  longint last_ar = -1;
  int n_ar = 0, n_ar_ok = 0;
  bit busy_since_ar = 0;
  always @(negedge clk) begin
    if (cstate == C_AR) begin
      if (last_ar >= 0 && !busy_since_ar) begin
        n_ar++;
        if (cyc - last_ar == longint'(TREFI)) n_ar_ok++;
        else $display("refresh interval %0d", cyc - last_ar);
      end
      last_ar = cyc;
      busy_since_ar = 0;
    end else if (cstate != C_IDLE && cstate != C_TRFC) busy_since_ar = 1;
  end

  task automatic access(bit rd, output int busy);
    longint t0;
    sys_req = 1; sys_r_wn = rd; sys_addr = ADDR_W'($urandom);
    #1 check(clk_en, "clk_en high as soon as a request is pending");
    while (!sys_ready) @(negedge clk);
    @(negedge clk);
    sys_req = 0;
    t0 = cyc;
    while (!sys_cyc_end) begin
      check(clk_en, "clk_en high during an access");
      @(negedge clk);
    end
    @(negedge clk);
    busy = int'(cyc - t0);
  endtask

  initial begin
    longint t0;
    int busy;
    #12 rst_n = 1;
    repeat (5) @(negedge clk);
    check(!clk_en && istate == I_IDLE, "idle before sys_dly_200us");
    dly = 1;
    t0 = cyc;
    #1 check(clk_en, "clk_en high during initialisation");
    while (!init_done) @(negedge clk);
    check(int'(cyc - t0) == 1 + 1 + 1 + TRP + 2 * (1 + TRFC) + 1 + TMRD,
          $sformatf("initialisation took %0d clocks", cyc - t0));
    @(negedge clk);
    check(!clk_en, "clk_en low when idle after initialisation");
    for (int k = 0; k < 30; k++) begin
      bit rd;
      rd = k[0];
      access(rd, busy);
      if (rd) check(busy == 1 + (TRCD - 1) + 1 + (CL + 1) + BL / 2, $sformatf("read took %0d", busy));
      else    check(busy == 1 + (TRCD - 1) + 1 + BL / 2 + TWR + TRP, $sformatf("write took %0d", busy));
      repeat ($urandom_range(0, 10)) @(negedge clk);
    end
    // idle: refreshes only
    repeat (5 * TREFI) begin
      @(negedge clk);
      if (cstate == C_IDLE && !ref_req) check(!clk_en, "clk_en low when idle");
      if (ref_req) check(!sys_ready, "no request taken while refresh pending");
    end
    check(n_ar >= 4, $sformatf("%0d idle refresh intervals seen", n_ar));
    check(n_ar_ok == n_ar, "refresh every TREFI clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
