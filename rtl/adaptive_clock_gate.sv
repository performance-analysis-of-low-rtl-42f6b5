// adaptive_clock_gate: activity-driven gating of the DDR clock pair.
//
// A flip-flop holds the controller's enable (`en`) from the previous clock;
// an XOR of its input and output flags the clock in which the enable
// changes. The clock is let through while `en` is high and, through the XOR
// term, for the clock in which `en` falls, so the last command of an access
// still meets a DDR clock edge; after that the pair stops (ddr_clk low,
// ddr_clkn high) until `en` rises again. The resulting clock enable is held
// in a flip-flop clocked on the falling edge of clk, so it changes only
// while clk is low and the gated clock has no glitches.
//
// The XOR-and-flip-flop structure and its use on the DDR clock follow the
// document. The falling-edge enable register, the one-clock extension after
// `en` falls and the AND gate that forms ddr_clk are this design's choices.
// Timing: `en` is sampled on both edges of clk (rising: history flip-flop,
// falling: gate enable); when `en` rises during a clock, ddr_clk pulses from
// the next rising edge of clk. rst_n asynchronous, active low, stops the
// clock.
`timescale 1ns / 1ps
module adaptive_clock_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic gated_clk,   // XOR of enable and its registered copy
  output logic gate_q,      // clock enable actually applied
  output logic ddr_clk,
  output logic ddr_clkn
);

  logic en_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) en_q <= 1'b0;
    else        en_q <= en;
  end

  assign gated_clk = en ^ en_q;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) gate_q <= 1'b0;
    else        gate_q <= en | gated_clk;
  end

  assign ddr_clk  = clk & gate_q;
  assign ddr_clkn = ~ddr_clk;

endmodule
