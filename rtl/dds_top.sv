// dds_top: direct digital synthesizer, the complete chip.
//
// A 12-bit tuning word sets the output frequency
//   f_out = tuning_word * f_clk / 4096,
// so the frequency step is f_clk / 4096 (about 12.2 kHz at the 50 MHz
// maximum clock). The chain is:
//   phase_accumulator : phase += tuning_word on each falling clock edge
//   rom_pointer       : folds the phase into the first quadrant
//   sine_lut          : 256 x 8 quarter-wave ROM, sign applied, 10-bit
//                       code latched on the falling edge
//   dac_10b           : behavioural model of the 10-bit DAC (3 V..4 V)
//
// Timing: every register changes on the falling edge of clk. The tuning
// word is sampled from the pins on the falling edge; the DAC code
// first reflects a new tuning word on the second falling edge after it
// is applied (the first edge takes it into the phase register, the
// second takes the resulting sample into the output latch), which is
// the two-clock update delay of the design description. The phase is never reset by a tuning change, so
// frequency hops are phase-continuous.
//
// The synchronous active-low reset and the digital dac_code output
// (the DAC input, brought out for test) are this design's additions;
// the pin list of the chip has only the tuning word, the clock, Vout and
// supplies.
module dds_top #(
  parameter int unsigned PHASE_W = dds_pkg::PHASE_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [PHASE_W-1:0]          tuning_word,
  output logic [dds_pkg::DAC_W-1:0]   dac_code,
  output real                         vout
);
  timeunit 1ns; timeprecision 1ps;


  logic [PHASE_W-1:0]       phase;
  dds_pkg::rom_addr_t       rom_addr;
  logic                     neg;

  phase_accumulator #(.PHASE_W(PHASE_W)) u_acc (
    .clk         (clk),
    .rst_n       (rst_n),
    .tuning_word (tuning_word),
    .phase       (phase)
  );

  rom_pointer #(.PHASE_W(PHASE_W)) u_ptr (
    .phase (phase),
    .addr  (rom_addr),
    .neg   (neg)
  );

  sine_lut u_lut (
    .clk   (clk),
    .rst_n (rst_n),
    .addr  (rom_addr),
    .neg   (neg),
    .code  (dac_code)
  );

  dac_10b u_dac (
    .code (dac_code),
    .vout (vout)
  );

endmodule
