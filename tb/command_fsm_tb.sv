// command_fsm_tb: self-checking test of the read/write command state machine.
//
// The wait/burst counter is modelled here independently. For reads, writes
// and refreshes the test checks the state the machine is in on every clock
// against the expected sequence and durations, and with it sys_ready,
// sys_wdata_req (high in WRITEA and in all but the last WDATA clock),
// sys_cyc_end (last clock of the access), ref_ack and the latched address
// and direction. It also checks that no request is taken before
// initialisation is done or while a refresh is pending.
`timescale 1ns / 1ps
module command_fsm_tb;
  import ddr_pkg::*;

  localparam int TRCD = 3, CL = 2, BL = 8, TDAL = 4, TRFC = 5, CW = 12;

  logic              clk = 0, rst_n = 0, init_done = 0;
  logic              sys_req = 0, sys_r_wn = 0, ref_req = 0;
  logic [ADDR_W-1:0] sys_addr = '0;
  logic              sys_ready, sys_wdata_req, sys_cyc_end, ref_ack;
  logic              cnt_load, cnt_done, req_r_wn;
  logic [CW-1:0]     cnt_val, cnt = '0;
  cstate_e           cstate;
  sys_addr_t         req_addr;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  command_fsm #(.TRCD(TRCD), .CL(CL), .BL(BL), .TDAL(TDAL), .TRFC(TRFC), .CW(CW)) dut (
    .clk, .rst_n, .init_done, .sys_req, .sys_r_wn, .sys_addr, .sys_ready,
    .sys_wdata_req, .sys_cyc_end, .ref_req, .ref_ack,
    .cnt_done, .cnt_load, .cnt_val, .cstate, .req_addr, .req_r_wn
  );

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
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Walk one expected phase: state s for n clocks; req = clocks with
  // sys_wdata_req high at the start of the phase; end = cyc_end on its last clock.
  task automatic phase(cstate_e s, int n, int req = 0, bit endp = 0, bit ack = 0);
    for (int c = 0; c < n; c++) begin
      check(cstate == s, $sformatf("state %s, expected %s", cstate.name(), s.name()));
      check(sys_wdata_req == (c < req), $sformatf("sys_wdata_req in %s clock %0d", s.name(), c));
      check(sys_cyc_end == (endp && c == n - 1), $sformatf("sys_cyc_end in %s", s.name()));
      check(ref_ack == (ack && c == 0), "ref_ack");
      check(!sys_ready, "not ready while busy");
      @(negedge clk);
    end
  endtask

  task automatic request(bit rd, logic [ADDR_W-1:0] a);
    sys_req = 1; sys_r_wn = rd; sys_addr = a;
    check(sys_ready, "ready in idle");
    @(negedge clk);
    sys_req = 0; sys_addr = ~a; sys_r_wn = !rd;
    check(req_addr == sys_addr_t'(~sys_addr) && req_r_wn == rd, "address and direction latched");
  endtask

  initial begin
    logic [ADDR_W-1:0] a;
    #12 rst_n = 1;
    // no request before initialisation
    @(negedge clk);
    sys_req = 1;
    repeat (3) begin
      @(negedge clk);
      check(!sys_ready && cstate == C_IDLE, "held off before init_done");
    end
    sys_req = 0;
    init_done = 1;
    @(negedge clk);
    for (int k = 0; k < 20; k++) begin
      a = ADDR_W'($urandom);
      if ($urandom_range(0, 1) == 1) begin
        request(1, a);
        phase(C_ACTIVE, 1);
        phase(C_TRCD, TRCD - 1);
        phase(C_READA, 1);
        phase(C_CL, CL + 1);
        phase(C_RDATA, BL / 2, 0, 1);
      end else begin
        request(0, a);
        phase(C_ACTIVE, 1);
        phase(C_TRCD, TRCD - 1);
        phase(C_WRITEA, 1, 1);
        phase(C_WDATA, BL / 2, BL / 2 - 1);
        phase(C_TDAL, TDAL, 0, 1);
      end
      check(cstate == C_IDLE && sys_ready, "back in idle and ready");
      if (k % 4 == 3) begin
        // refresh has priority over a simultaneous request
        ref_req = 1; sys_req = 1;
        #1 check(!sys_ready, "not ready while refresh pending");
        @(negedge clk);
        ref_req = 0;
        phase(C_AR, 1, 0, 0, 1);
        phase(C_TRFC, TRFC);
        sys_req = 0;
        check(cstate == C_IDLE, "idle after refresh");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
