// phase_accumulator: 12-bit phase accumulator of the synthesizer.
//
// On every falling clock edge the phase register takes phase + tuning
// word, modulo 2**12, so the phase advances by a fixed angle per clock
// and the output frequency is f = tuning_word * f_clk / 4096. The adder
// is a chain of 4-bit carry-lookahead slices (cla_adder4): lookahead
// inside a slice, carry passed from slice to slice. Each slice's sum is
// held in a 4-bit falling-edge latch (nedge_latch) whose output feeds
// back as the adder's other operand; the latches isolate the adder inputs
// from its outputs. The final carry is dropped, which gives the
// wrap-around from 2*pi back to 0.
//
// The tuning word is sampled straight from the input pins on the
// falling edge; a change of tuning word takes effect on the next step
// and the phase itself never jumps, so frequency switches are
// phase-continuous.
//
// Interface: clk, rst_n (synchronous, active low, clears the phase),
// tuning_word (PHASE_W bits) -> phase (PHASE_W bits, registered).
module phase_accumulator #(
  parameter int unsigned PHASE_W = dds_pkg::PHASE_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHASE_W-1:0] tuning_word,
  output logic [PHASE_W-1:0] phase
);
  timeunit 1ns; timeprecision 1ps;


  localparam int unsigned SLICE_W = 4;  // width of one adder / latch slice
  localparam int unsigned SLICES  = PHASE_W / SLICE_W;

  // carry[SLICES], the carry out of the top slice, is left unused: it
  // is the overflow past 2*pi that the modulo-2**PHASE_W wrap discards.
  logic [SLICES:0]      carry;
  logic [PHASE_W-1:0]   next_phase;

  assign carry[0] = 1'b0;

  for (genvar s = 0; s < SLICES; s++) begin : g_slice
    cla_adder4 u_add (
      .a    (phase[SLICE_W*s +: SLICE_W]),
      .b    (tuning_word[SLICE_W*s +: SLICE_W]),
      .cin  (carry[s]),
      .sum  (next_phase[SLICE_W*s +: SLICE_W]),
      .cout (carry[s+1])
    );

    nedge_latch #(.WIDTH(SLICE_W)) u_latch (
      .clk   (clk),
      .rst_n (rst_n),
      .d     (next_phase[SLICE_W*s +: SLICE_W]),
      .q     (phase[SLICE_W*s +: SLICE_W])
    );
  end

  initial begin
    assert (PHASE_W % SLICE_W == 0)
      else $error("PHASE_W must be a multiple of 4");
  end

endmodule
