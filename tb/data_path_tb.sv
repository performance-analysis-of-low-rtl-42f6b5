// data_path_tb: self-checking test of the double-data-rate data path.
//
// The testbench makes clk (10 ns) and clk2x (5 ns, rising with both edges of
// clk) and plays the command state machine by stepping `cstate`.
// Write: WRITEA, four WDATA clocks with a new 128-bit word in each, then
// idle. Checked: the eight beats seen on dq_o at the eight edges of dqs_o
// (low half then high half of each word, in order), dq_en high at every
// strobe edge, the first rising strobe edge three clocks after WRITEA
// begins, preamble (dqs_en high, dqs low) half a clock before it, postamble
// half a clock after the last edge, and no strobe edges outside the burst.
// Read: READA, CL + 1 clocks of C_CL, four clocks of C_RDATA; the testbench
// drives eight beats on dq_i edge-aligned with clk starting CAS latency + 2
// clocks after READA and checks the four 128-bit words on sys_rdata with
// sys_rd_valid.
`timescale 1ns / 1ps
module data_path_tb;
  import ddr_pkg::*;

  localparam int CL = 2;

  logic              clk = 0, clk2x = 0, rst_n = 0;
  cstate_e           cstate = C_IDLE;
  logic [DATA_W-1:0] sys_wdata = '0, sys_rdata;
  logic              sys_rd_valid;
  logic [DQ_W-1:0]   dq_o, dq_i = '0;
  logic              dq_en, dqs_o, dqs_en;
  int checks = 0, failures = 0;

  always begin
    clk <= 1; clk2x <= 1; #2.5;
    clk2x <= 0; #2.5;
    clk <= 0; clk2x <= 1; #2.5;
    clk2x <= 0; #2.5;
  end

  data_path dut (.clk, .clk2x, .rst_n, .cstate, .sys_wdata, .sys_rdata, .sys_rd_valid,
                 .dq_o, .dq_en, .dq_i, .dqs_o, .dqs_en);

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

  // strobe monitor
  logic [DQ_W-1:0] beats [$];
  realtime         edge_t [$];
  realtime         en_rise_t, en_fall_t;
  always @(posedge dqs_o or negedge dqs_o) begin
    if (rst_n) begin
      beats.push_back(dq_o);
      edge_t.push_back($realtime);
      check(dq_en && dqs_en, "dq_en and dqs_en high at a strobe edge");
    end
  end
  always @(posedge dqs_en) begin en_rise_t = $realtime; check(!dqs_o, "preamble: dqs low"); end
  always @(negedge dqs_en) en_fall_t = $realtime;

  // step to the next clock: state changes just after the rising edge
  task automatic step(cstate_e s);
    @(posedge clk);
    #1 cstate = s;
  endtask

  initial begin
    logic [DATA_W-1:0] w [4];
    realtime t_wa;
    #12 rst_n = 1;
    for (int rep = 0; rep < 6; rep++) begin
      // ------------------------------------------------ write burst
      for (int i = 0; i < 4; i++) w[i] = {$urandom, $urandom, $urandom, $urandom};
      beats.delete(); edge_t.delete();
      step(C_WRITEA);
      t_wa = $realtime - 1;
      for (int j = 0; j < 4; j++) begin
        step(C_WDATA);
        sys_wdata = w[j];
      end
      step(C_TDAL);
      sys_wdata = '0;
      repeat (6) step(C_TDAL);
      step(C_IDLE);
      check(beats.size() == 8, $sformatf("%0d strobe edges", beats.size()));
      if (beats.size() == 8) begin
        for (int k = 0; k < 8; k++)
          check(beats[k] == (k[0] ? w[k/2][DATA_W-1:DQ_W] : w[k/2][DQ_W-1:0]),
                $sformatf("write beat %0d", k));
        for (int k = 0; k < 8; k++)
          check(edge_t[k] == t_wa + 30.0 + 5.0 * k, $sformatf("strobe edge %0d at %t", k, edge_t[k]));
        check(en_rise_t == t_wa + 25.0, "preamble starts half a clock before the first strobe edge");
        check(en_fall_t == t_wa + 70.0, "postamble ends half a clock after the last strobe edge");
      end
      check(!dq_en && !dqs_en, "bus released after the burst");

      // ------------------------------------------------ read burst
      for (int i = 0; i < 4; i++) w[i] = {$urandom, $urandom, $urandom, $urandom};
      fork
        begin
          step(C_READA);
          repeat (CL + 1) step(C_CL);
          repeat (4) step(C_RDATA);
          step(C_IDLE);
        end
        begin
          // memory: first beat CL + 2 clocks after READA begins
          @(posedge clk);
          repeat (CL + 2) @(posedge clk);
          for (int i = 0; i < 4; i++) begin
            dq_i <= w[i][DQ_W-1:0];
            @(negedge clk);
            dq_i <= w[i][DATA_W-1:DQ_W];
            @(posedge clk);
          end
          dq_i <= '0;
        end
        begin
          int n;
          n = 0;
          @(posedge clk);
          repeat (CL + 8) begin
            @(negedge clk);
            if (sys_rd_valid) begin
              check(n < 4 && sys_rdata == w[n], $sformatf("read word %0d", n));
              n++;
            end
          end
          check(n == 4, $sformatf("%0d read words", n));
        end
      join
      step(C_IDLE);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
