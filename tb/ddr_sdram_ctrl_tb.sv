// ddr_sdram_ctrl_tb: end-to-end test of the DDR SDRAM controller at its
// default parameters, against the behavioural DDR SDRAM model.
//
// A 133 MHz reference clock drives the controller; sys_dly_200us rises after
// a real 200 us. The bus master then runs a mix of burst writes and reads
// (random banks, rows and burst-aligned columns, plus the address and data
// pattern of the reference read waveform) and checks:
//   * every read word against a shadow copy of what was written;
//   * the beats the memory stored for one write, against the 128-bit words;
//   * the read latency (5 + CAS latency clocks from the accepting edge to the
//     edge that presents the first word) and the occupancy of a read and a
//     write;
//   * that the memory model saw no protocol or timing violation and that
//     AUTO REFRESH came at least every T_REFI clocks plus one access.
// It also counts that each mechanism happened: initialisation, writes, reads,
// periodic AUTO REFRESH, a request held off by a pending refresh, a stopped
// DDR clock (clock gating) and its restart, back-to-back accesses.
`timescale 1ns / 1ps
module ddr_sdram_ctrl_tb;
  import ddr_pkg::*;

  localparam realtime TREF = 7.5;
  localparam int N_OPS     = 400;

  logic              ref_clk = 0, rst_n = 0, sys_clk;
  logic              sys_dly_200us = 0, sys_init_done;
  logic              sys_req = 0, sys_r_wn = 1, sys_ready;
  logic [ADDR_W-1:0] sys_addr = '0;
  logic [DATA_W-1:0] sys_wdata = '0, sys_rdata;
  logic              sys_wdata_req, sys_rd_valid, sys_cyc_end;
  logic              ddr_clk, ddr_clkn, ddr_cke, ddr_csn, ddr_rasn, ddr_casn, ddr_wen;
  logic [BA_W-1:0]   ddr_ba;
  logic [ROW_W-1:0]  ddr_ad;
  logic [DQ_W-1:0]   ddr_dq_o, ddr_dq_i;
  logic              ddr_dq_en, ddr_dqs_o, ddr_dqs_en;
  logic              m_dq_en, m_dqs, m_dqs_en;

  int checks = 0, failures = 0;

  always #(TREF / 2.0) ref_clk = ~ref_clk;

  ddr_sdram_ctrl dut (
    .ref_clk, .rst_n, .sys_clk, .sys_dly_200us, .sys_init_done,
    .sys_req, .sys_r_wn, .sys_addr, .sys_ready, .sys_wdata, .sys_wdata_req,
    .sys_rdata, .sys_rd_valid, .sys_cyc_end,
    .ddr_clk, .ddr_clkn, .ddr_cke, .ddr_csn, .ddr_rasn, .ddr_casn, .ddr_wen,
    .ddr_ba, .ddr_ad, .ddr_dq_o, .ddr_dq_en, .ddr_dq_i, .ddr_dqs_o, .ddr_dqs_en
  );

  ddr_sdram_model #(.TCK_NS(TREF)) u_mem (
    .ck(ddr_clk), .ck_n(ddr_clkn), .cke(ddr_cke), .csn(ddr_csn), .rasn(ddr_rasn),
    .casn(ddr_casn), .wen(ddr_wen), .ba(ddr_ba), .ad(ddr_ad),
    .dq_in(ddr_dq_o), .dq_in_en(ddr_dq_en), .dqs_in(ddr_dqs_o),
    .dq_out(ddr_dq_i), .dq_out_en(m_dq_en), .dqs_out(m_dqs), .dqs_out_en(m_dqs_en)
  );

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("%t FAIL: %s", $realtime, msg);
    end
  endtask

  // ------------------------------------------------------------ clock count and mechanisms
  longint unsigned cyc = 0;
  int gated_cycles = 0, clk_restarts = 0, held_by_refresh = 0, back_to_back = 0;
  int init_seen = 0;
  logic prev_gate = 0;
  always @(posedge sys_clk) begin
    cyc++;
    if (dut.u_cg.gate_q == 0 && sys_init_done) gated_cycles++;
    if (dut.u_cg.gate_q && !prev_gate && sys_init_done) clk_restarts++;
    prev_gate <= dut.u_cg.gate_q;
    if (sys_req && !sys_ready && dut.ref_req && dut.cstate == C_IDLE && sys_init_done)
      held_by_refresh++;
  end

  // ------------------------------------------------------------ shadow memory
  logic [DATA_W-1:0] shadow [logic [ADDR_W-1:0]];

  function automatic logic [DATA_W-1:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // Write one burst of four words; returns clocks from the accepting edge to sys_cyc_end.
  task automatic do_write(logic [ADDR_W-1:0] a, logic [DATA_W-1:0] w [4], output int busy);
    int k;
    longint unsigned t0;
    @(negedge sys_clk);
    sys_req = 1; sys_r_wn = 0; sys_addr = a;
    do @(posedge sys_clk); while (!(sys_ready && sys_req));
    t0 = cyc;
    @(negedge sys_clk);
    sys_req = 0;
    k = 0;
    forever begin
      @(posedge sys_clk);
      if (sys_cyc_end) break;
      if (sys_wdata_req) begin
        @(negedge sys_clk);
        sys_wdata = w[k];
        k++;
      end
    end
    busy = int'(cyc - t0);
    check(k == 4, $sformatf("write took %0d words", k));
    for (int i = 0; i < 4; i++) shadow[{a[ADDR_W-1:3], 3'(2*i)}] = w[i];
  endtask

  task automatic do_read(logic [ADDR_W-1:0] a, output logic [DATA_W-1:0] r [4],
                         output int lat, output int busy);
    int k;
    longint unsigned t0;
    @(negedge sys_clk);
    sys_req = 1; sys_r_wn = 1; sys_addr = a;
    do @(posedge sys_clk); while (!(sys_ready && sys_req));
    t0 = cyc;
    @(negedge sys_clk);
    sys_req = 0;
    k = 0; lat = -1;
    forever begin
      @(posedge sys_clk);
      if (sys_rd_valid) begin
        if (k == 0) lat = int'(cyc - t0) - 1;
        if (k < 4) r[k] = sys_rdata;
        k++;
      end
      if (sys_cyc_end) break;
    end
    busy = int'(cyc - t0);
    // the word registered on the edge that ends C_RDATA is seen one clock later
    @(posedge sys_clk);
    if (sys_rd_valid) begin if (k < 4) r[k] = sys_rdata; k++; end
    check(k == 4, $sformatf("read returned %0d words", k));
  endtask

  // ------------------------------------------------------------ watchdog
  initial begin
    #(TREF * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ stimulus
  initial begin
    logic [DATA_W-1:0] w [4], r [4];
    logic [ADDR_W-1:0] a, fig_a;
    logic [ADDR_W-1:0] written [$];
    int lat, busy;
    int n_w, n_r;

    n_w = 0;
    n_r = 0;
    #(TREF * 10) rst_n = 1;
    #200us;
    @(negedge sys_clk) sys_dly_200us = 1;
    wait (sys_init_done);
    init_seen = 1;
    check(u_mem.mode_set && u_mem.bl == BURST_LEN && u_mem.cl == CAS_LAT,
          "mode register holds BL 8, CAS latency 2");
    check(u_mem.n_ref == 2 && u_mem.n_pre == 1 && u_mem.n_lmr == 1,
          "initialisation: one PRECHARGE, two AUTO REFRESH, one LOAD MODE");

    // Address and data of the reference read waveform
    fig_a = 22'h183746;
    fig_a[2:0] = 3'b000;
    w[0] = 128'h87665439876543458768965793246895;
    for (int i = 1; i < 4; i++) w[i] = w[0] + 128'(i);
    do_write(fig_a, w, busy);
    n_w++;
    check(busy == 1 + (T_RCD - 1) + 1 + BURST_LEN/2 + T_WR + T_RP,
          $sformatf("write occupancy %0d clocks", busy));
    for (int i = 0; i < 4; i++) begin
      check(u_mem.mem[{fig_a[ADDR_W-1:3], 3'(2*i)}]   == w[i][DQ_W-1:0], "stored low beat");
      check(u_mem.mem[{fig_a[ADDR_W-1:3], 3'(2*i+1)}] == w[i][DATA_W-1:DQ_W], "stored high beat");
    end
    do_read(fig_a, r, lat, busy);
    n_r++;
    check(lat == 5 + CAS_LAT, $sformatf("read latency %0d clocks", lat));
    check(busy == 1 + (T_RCD - 1) + 1 + (CAS_LAT + 1) + BURST_LEN/2,
          $sformatf("read occupancy %0d clocks", busy));
    for (int i = 0; i < 4; i++) check(r[i] == w[i], $sformatf("reference word %0d", i));
    written.push_back(fig_a);

    // Idle long enough for refreshes and a stopped DDR clock
    repeat (3 * T_REFI) @(posedge sys_clk);

    // A request that arrives together with a due refresh must wait for it
    @(posedge dut.ref_req);
    do_read(fig_a, r, lat, busy);
    n_r++;
    for (int i = 0; i < 4; i++) check(r[i] == w[i], "reference word after refresh");

    // Random traffic, requests issued back to back
    for (int op = 0; op < N_OPS; op++) begin
      bit rd;
      rd = (written.size() > 0) && ($urandom_range(0, 1) == 1);
      if (rd) begin
        a = written[$urandom_range(0, written.size() - 1)];
        do_read(a, r, lat, busy);
        n_r++;
        check(lat == 5 + CAS_LAT, "read latency");
        for (int i = 0; i < 4; i++)
          check(r[i] == shadow[{a[ADDR_W-1:3], 3'(2*i)}], $sformatf("read word %0d at %h", i, a));
      end else begin
        a = ADDR_W'($urandom);
        a[2:0] = 3'b000;
        for (int i = 0; i < 4; i++) w[i] = rnd128();
        do_write(a, w, busy);
        n_w++;
        written.push_back(a);
      end
      if (sys_ready) back_to_back++;
      if (op % 97 == 0) repeat ($urandom_range(1, 30)) @(posedge sys_clk);
    end

    repeat (20) @(posedge sys_clk);
    check(u_mem.errors == 0, $sformatf("memory model saw %0d violations", u_mem.errors));
    check(u_mem.n_write == n_w && u_mem.n_read == n_r, "one WRITE/READ command per access");
    check(u_mem.n_wbeats == BURST_LEN * n_w, "write beats");
    // mechanisms
    check(init_seen == 1, "initialisation ran");
    check(n_w > 0 && n_r > 0, "reads and writes ran");
    check(u_mem.n_ref > 2 + 2, $sformatf("periodic AUTO REFRESH ran (%0d)", u_mem.n_ref - 2));
    check(u_mem.max_ref_gap <= real'(T_REFI + 16) * TREF,
          $sformatf("longest refresh gap %0t ns", u_mem.max_ref_gap));
    check(held_by_refresh > 0, "a request was held off by a refresh");
    check(gated_cycles > 0, "DDR clock was stopped by the clock gate");
    check(clk_restarts > 0, "DDR clock restarted");
    check(back_to_back > 0, "back-to-back accesses");
    $display("writes=%0d reads=%0d refreshes=%0d held_by_refresh=%0d gated_cycles=%0d restarts=%0d",
             n_w, n_r, u_mem.n_ref - 2, held_by_refresh, gated_cycles, clk_restarts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
