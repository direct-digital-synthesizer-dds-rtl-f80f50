// nedge_latch: register that updates on the falling clock edge.
//
// The synthesizer's storage elements (the phase register slices and the
// latches in front of the DAC) all change their outputs on the falling
// edge of the clock, as the design description specifies; this is that
// element. It is edge-triggered, not level-sensitive, so the accumulator
// loop through it is never transparent. WIDTH defaults to the 4-bit slice
// of the description; the DAC-side latch uses it at 10 bits.
//
// The synchronous active-low reset rst_n is this design's addition (the
// pin list has no reset): it is sampled on the same falling edge and
// clears the output to zero.
//
// Interface: clk, rst_n, d -> q. q takes d one falling edge later.
module nedge_latch #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  timeunit 1ns; timeprecision 1ps;


  always_ff @(negedge clk) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule
