// data_path: data path module of the DDR SDRAM controller.
//
// Moves 128-bit bus-master words to and from the 64-bit DDR data bus, one
// 64-bit beat on each edge of clk, using clk2x (twice the frequency of clk,
// rising edges aligned with both edges of clk) to time the beats.
//
// Write: during C_WDATA the module stores one sys_wdata word per clock in
// wr_word. The DDR write strobe dqs_o is made on the rising edges of clk2x:
// it rises with clk one clock after the memory takes WRITE (tDQSS = 1 clock)
// and toggles on every clk2x edge for BURST_LEN edges. dqs_en rises half a
// clock earlier (preamble, DQS low) and falls half a clock after the last
// strobe edge (postamble). The data beats are launched on the falling edges
// of clk2x, a quarter clock before each strobe edge, so every strobe edge
// sits in the middle of its beat (centre-aligned write): the low half of a
// word a quarter clock before the rising edge of clk, the high half a quarter
// clock before the falling edge (from a holding register, because wr_word
// has moved on to the next word by then).
//
// Read: dq_i is sampled on every falling edge of clk2x, i.e. in the middle
// of each beat the memory drives edge-aligned with ddr_clk. The last two
// samples form a 128-bit word that is registered into sys_rdata on the next
// rising edge of clk while the command state machine is in C_RDATA;
// sys_rd_valid marks each of the BURST_LEN/2 words. The read strobe of the
// memory is not used: the CAS latency is fixed and known, and the capture
// is timed from clk2x.
//
// The document gives the task of the module (store write data, evaluate read
// data, transfer on both edges, use clk2x for the data path timing); how the
// beats, strobes and enables are timed is this design's choice.
//
// Phase detection: a flip-flop `tgl` toggles on every rising edge of clk. A
// clk2x-domain copy of it equals tgl at the clk2x edges that coincide with a
// rising edge of clk and differs at the edges in the middle of the clock; a
// second copy on the falling edges of clk2x tells the first quarter of the
// clock from the third in the same way.
// Timing: rst_n asynchronous, active low, common to both clocks.
`timescale 1ns / 1ps
module data_path
  import ddr_pkg::*;
(
  input  logic              clk,
  input  logic              clk2x,
  input  logic              rst_n,
  input  cstate_e           cstate,
  // bus master side
  input  logic [DATA_W-1:0] sys_wdata,
  output logic [DATA_W-1:0] sys_rdata,
  output logic              sys_rd_valid,
  // DDR side
  output logic [DQ_W-1:0]   dq_o,
  output logic              dq_en,
  input  logic [DQ_W-1:0]   dq_i,
  output logic              dqs_o,
  output logic              dqs_en
);

  logic [DATA_W-1:0] wr_word;
  logic [DQ_W-1:0]   hi_hold, cap_a, cap_b;
  logic              drv, tgl, tgl_p, tgl_n;
  logic              rise_phase, first_quarter;

  // ---------------------------------------------------------------- clk
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_word      <= '0;
      drv          <= 1'b0;
      tgl          <= 1'b0;
      sys_rdata    <= '0;
      sys_rd_valid <= 1'b0;
    end else begin
      tgl <= ~tgl;
      drv <= (cstate == C_WDATA);   // one clock later: the clock before each word's beats
      if (cstate == C_WDATA) wr_word <= sys_wdata;
      sys_rd_valid <= (cstate == C_RDATA);
      if (cstate == C_RDATA) sys_rdata <= {cap_a, cap_b};
    end
  end

  // ---------------------------------------------------------------- clk2x rising: strobe
  assign rise_phase = (tgl == tgl_p);

  always_ff @(posedge clk2x or negedge rst_n) begin
    if (!rst_n) begin
      tgl_p  <= 1'b0;
      dqs_o  <= 1'b0;
      dqs_en <= 1'b0;
    end else begin
      tgl_p <= tgl;
      if (rise_phase) begin
        dqs_o  <= drv;
        dqs_en <= drv;
      end else begin
        dqs_o  <= 1'b0;
        dqs_en <= drv || dqs_o;     // preamble before, postamble after the burst
      end
    end
  end

  // ---------------------------------------------------------------- clk2x falling: data
  assign first_quarter = (tgl != tgl_n);

  always_ff @(negedge clk2x or negedge rst_n) begin
    if (!rst_n) begin
      tgl_n   <= 1'b0;
      dq_o    <= '0;
      dq_en   <= 1'b0;
      hi_hold <= '0;
      cap_a   <= '0;
      cap_b   <= '0;
    end else begin
      tgl_n <= tgl;
      if (!first_quarter) begin
        dq_en <= drv;
        if (drv) begin
          dq_o    <= wr_word[DQ_W-1:0];
          hi_hold <= wr_word[DATA_W-1:DQ_W];
        end
      end else if (dq_en) begin
        dq_o <= hi_hold;
      end
      cap_a <= dq_i;
      cap_b <= cap_a;
    end
  end

endmodule
