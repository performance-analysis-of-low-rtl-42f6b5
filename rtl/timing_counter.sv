// timing_counter: the wait and burst counter of the main control module.
//
// A state machine that enters a wait state of N clocks pulses `load` with
// load_val = N-1 on the clock edge that enters the state; the count then runs
// down by one per clock and holds at zero. `done` is high while the count is
// zero, so the state machine leaves the wait state on the edge that ends its
// N-th clock. The same counter times tRP, tRFC, tMRD, tRCD and the CAS
// latency, and as the burst counter it fixes how many clocks a read or write
// burst occupies, which decides when the next READ or WRITE may be issued.
// The document names the counter and its burst-count role; the down-counting
// form with a load input is this design's choice.
//
// Timing: `load` and `load_val` are sampled on the rising edge of clk; `done`
// and `count` are registered. Reset (rst_n low, asynchronous) clears the count.
`timescale 1ns / 1ps
module timing_counter #(
  parameter int unsigned WIDTH = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] load_val,
  output logic [WIDTH-1:0] count,
  output logic             done
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              count <= '0;
    else if (load)           count <= load_val;
    else if (count != '0)    count <= count - 1'b1;
  end

  assign done = (count == '0);

endmodule
