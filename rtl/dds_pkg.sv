// dds_pkg: widths and types shared by the direct digital synthesizer.
//
// The synthesizer is built around a 12-bit phase word. Its ten most
// significant bits address the sine table: the top bit selects the half
// wave (sign), the next selects rising or falling quarter, and the eight
// below form the quarter-wave ROM address. The two lowest phase bits only
// add frequency resolution. The ROM holds 8-bit magnitudes and the DAC
// takes a 10-bit offset-binary code. All widths follow the design
// description except the 1-bit step from 8-bit magnitude to 10-bit code,
// which is this design's choice (see dac_code() below).
package dds_pkg;
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned PHASE_W = 12;  // phase accumulator width
  localparam int unsigned ADDR_W  = 8;   // quarter-wave ROM address width
  localparam int unsigned MAG_W   = 8;   // ROM word width (256-byte ROM)
  localparam int unsigned DAC_W   = 10;  // DAC input width

  typedef logic [PHASE_W-1:0] phase_t;
  typedef logic [ADDR_W-1:0]  rom_addr_t;
  typedef logic [MAG_W-1:0]   mag_t;
  typedef logic [DAC_W-1:0]   dac_code_t;

  // Sign-magnitude to offset-binary conversion for the DAC.
  // Positive half wave: 512 + 2*mag  (512 .. 1022)
  // Negative half wave: 511 - 2*mag  (511 .. 1)
  // The two halves are exact mirror images about mid-scale (511.5), so
  // the waveform has no DC offset and no step at the zero crossings.
  function automatic dac_code_t dac_code(input logic neg, input mag_t mag);
    return {~neg, mag ^ {MAG_W{neg}}, neg};
  endfunction

endpackage
