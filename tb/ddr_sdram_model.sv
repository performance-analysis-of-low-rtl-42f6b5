// ddr_sdram_model: behavioural model of a four-bank, 64-bit DDR SDRAM for
// the controller testbenches (not synthesizable).
//
// The model takes the command bus in the middle of each ddr_clk cycle (on
// the falling edge), which in a zero-delay simulation stands for the next
// rising edge of the real device. It keeps the initialisation state, the
// mode register (burst length, CAS latency) and the open row of each bank,
// stores written beats in a sparse array keyed by {bank, row, column}, and
// counts each timing or protocol violation in `errors`:
//   * ACTIVE/READ/WRITE before PRECHARGE-all, two AUTO REFRESH and LOAD MODE;
//   * tRP, tRCD, tRFC, tMRD and write recovery, checked in nanoseconds;
//   * READ/WRITE to a closed bank, ACTIVE to an open bank, AUTO REFRESH or
//     LOAD MODE with a bank open; READ/WRITE without auto-precharge;
//   * write strobe: first rising DQS edge 0.75..1.25 clocks after WRITE,
//     strobe edges without a pending write, DQ not driven at a strobe edge.
// Reads drive DQ and DQS edge-aligned with ddr_clk, CAS latency clocks after
// the READ, one beat per clock edge, with sequential burst order inside the
// burst-aligned block of columns.
`timescale 1ns / 1ps
module ddr_sdram_model
  import ddr_pkg::*;
#(
  parameter realtime TCK_NS = 7.5,
  parameter realtime TRP_NS  = 15.0,
  parameter realtime TRCD_NS = 15.0,
  parameter realtime TRFC_NS = 75.0,
  parameter realtime TWR_NS  = 15.0
) (
  input  logic             ck,
  input  logic             ck_n,
  input  logic             cke,
  input  logic             csn,
  input  logic             rasn,
  input  logic             casn,
  input  logic             wen,
  input  logic [BA_W-1:0]  ba,
  input  logic [ROW_W-1:0] ad,
  input  logic [DQ_W-1:0]  dq_in,
  input  logic             dq_in_en,
  input  logic             dqs_in,
  output logic [DQ_W-1:0]  dq_out,
  output logic             dq_out_en,
  output logic             dqs_out,
  output logic             dqs_out_en
);

  localparam realtime EPS = 0.01;

  logic [DQ_W-1:0] mem [logic [ADDR_W-1:0]];

  int errors = 0;
  int n_act = 0, n_read = 0, n_write = 0, n_ref = 0, n_pre = 0, n_lmr = 0;
  int n_wbeats = 0, n_rbeats = 0;
  bit pre_done = 0, mode_set = 0;
  int init_refs = 0;
  int bl = 8, cl = 2;
  bit          open_b [4];
  logic [ROW_W-1:0] open_row [4];
  realtime     ready_t [4];
  realtime     act_t [4];
  realtime     ref_t = -1000.0, lmr_t = -1000.0;
  realtime     max_ref_gap = 0.0;   // longest time between AUTO REFRESH after initialisation

  int unsigned pc = 0;            // ddr_clk rising edges seen
  bit          rd_pend = 0;
  int unsigned rd_start;
  logic [ADDR_W-1:0] rd_base;

  int          wr_seq = 0, wr_done_seq = 0, wr_beat = 0;
  logic [ADDR_W-1:0] wr_base;
  realtime     wr_cmd_t;

  function automatic logic [ADDR_W-1:0] beat_addr(logic [ADDR_W-1:0] base, int k);
    logic [ADDR_W-1:0] a;
    a = base;
    a[2:0] = base[2:0] + 3'(k);
    return a;
  endfunction

  function automatic logic [DQ_W-1:0] rd_mem(logic [ADDR_W-1:0] a);
    if (mem.exists(a)) return mem[a];
    return '0;
  endfunction

  task automatic fail(string msg);
    errors++;
    $display("%t ddr_sdram_model: %s", $realtime, msg);
  endtask

  initial begin
    foreach (open_b[i]) begin open_b[i] = 0; ready_t[i] = 0.0; act_t[i] = -1000.0; end
    dq_out = '0; dq_out_en = 0; dqs_out = 0; dqs_out_en = 0;
  end

  always @(posedge ck or negedge ck) begin
    if (ck) begin
      // ---------------------------------------------------- rising edge
      pc = pc + 1;
      if (rd_pend && pc >= rd_start && pc < rd_start + bl/2) begin
        dq_out     <= rd_mem(beat_addr(rd_base, 2*int'(pc - rd_start)));
        dq_out_en  <= 1'b1;
        dqs_out    <= 1'b1;
        dqs_out_en <= 1'b1;
        n_rbeats++;
      end else if (rd_pend && pc == rd_start + bl/2) begin
        dq_out_en  <= 1'b0;
        dqs_out_en <= 1'b0;
        rd_pend     = 0;
      end else if (rd_pend && pc == rd_start - 1) begin
        dqs_out_en <= 1'b1;   // read preamble
        dqs_out    <= 1'b0;
      end
    end else begin
      // ---------------------------------------------------- falling edge
      if (rd_pend && pc >= rd_start && pc < rd_start + bl/2) begin
        dq_out  <= rd_mem(beat_addr(rd_base, 2*int'(pc - rd_start) + 1));
        dqs_out <= 1'b0;
        n_rbeats++;
      end
      if (cke && !csn) command($realtime + TCK_NS / 2.0);
    end
  end

  task automatic command(realtime t);
    logic [3:0] c;
    int b;
    c = {csn, rasn, casn, wen};
    b = int'(ba);
    unique case (c)
      CMD_NOP: ;
      CMD_PRE: begin
        n_pre++;
        if (ad[10]) begin
          foreach (open_b[i]) if (open_b[i]) begin open_b[i] = 0; ready_t[i] = t + TRP_NS; end
          pre_done = 1;
        end else if (open_b[b]) begin
          open_b[b] = 0; ready_t[b] = t + TRP_NS;
        end
      end
      CMD_AR: begin
        n_ref++;
        if (!pre_done) fail("AUTO REFRESH before PRECHARGE all");
        foreach (open_b[i]) begin
          if (open_b[i]) fail("AUTO REFRESH with a bank open");
          if (t + EPS < ready_t[i]) fail("AUTO REFRESH before tRP/tWR elapsed");
        end
        if (t + EPS < ref_t + TRFC_NS) fail("AUTO REFRESH inside tRFC");
        if (mode_set && t - ref_t > max_ref_gap) max_ref_gap = t - ref_t;
        ref_t = t;
        init_refs++;
      end
      CMD_LMR: begin
        n_lmr++;
        if (init_refs < 2) fail("LOAD MODE before two AUTO REFRESH");
        if (t + EPS < ref_t + TRFC_NS) fail("LOAD MODE inside tRFC");
        foreach (open_b[i]) if (open_b[i]) fail("LOAD MODE with a bank open");
        if (ba == 0) begin
          bl = 1 << int'(ad[2:0]);
          cl = int'(ad[6:4]);
          mode_set = 1;
        end
        lmr_t = t;
      end
      CMD_ACT: begin
        n_act++;
        if (!mode_set) fail("ACTIVE before initialisation");
        if (open_b[b]) fail("ACTIVE to an open bank");
        if (t + EPS < ready_t[b]) fail("ACTIVE before tRP/tWR elapsed");
        if (t + EPS < ref_t + TRFC_NS) fail("ACTIVE inside tRFC");
        if (t + EPS < lmr_t + 2.0 * TCK_NS) fail("ACTIVE inside tMRD");
        open_b[b] = 1; open_row[b] = ad; act_t[b] = t;
      end
      CMD_READ, CMD_WRITE: begin
        logic [ADDR_W-1:0] a;
        if (!open_b[b]) fail("READ/WRITE to a closed bank");
        if (t + EPS < act_t[b] + TRCD_NS) fail("READ/WRITE inside tRCD");
        if (!ad[10]) fail("READ/WRITE without auto-precharge");
        a = {ba, open_row[b], ad[COL_W-1:0]};
        open_b[b] = 0;
        if (c == CMD_READ) begin
          n_read++;
          if (rd_pend) fail("READ while a read burst is pending");
          rd_pend  = 1;
          rd_start = pc + 1 + cl;
          rd_base  = a;
          ready_t[b] = t + real'(bl/2) * TCK_NS + TRP_NS;
        end else begin
          n_write++;
          if (wr_seq != wr_done_seq) fail("WRITE while a write burst is pending");
          wr_seq++;
          wr_base  = a;
          wr_cmd_t = t;
          wr_beat  = 0;
          ready_t[b] = t + real'(1 + bl/2) * TCK_NS + TWR_NS + TRP_NS;
        end
      end
      default: fail($sformatf("unknown command %b", c));
    endcase
  endtask

  // Write data: one beat on each strobe edge.
  always @(posedge dqs_in or negedge dqs_in) begin
    if (wr_seq == wr_done_seq) begin
      if (mode_set) fail("write strobe edge without a pending WRITE");
    end else begin
      if (wr_beat == 0) begin
        if (!dqs_in) fail("first write strobe edge is falling");
        if ($realtime < wr_cmd_t + 0.75 * TCK_NS - EPS || $realtime > wr_cmd_t + 1.25 * TCK_NS + EPS)
          fail("first write strobe edge outside tDQSS");
      end
      if (!dq_in_en) fail("DQ not driven at a write strobe edge");
      mem[beat_addr(wr_base, wr_beat)] = dq_in;
      n_wbeats++;
      wr_beat++;
      if (wr_beat == bl) wr_done_seq = wr_seq;
    end
  end

endmodule
