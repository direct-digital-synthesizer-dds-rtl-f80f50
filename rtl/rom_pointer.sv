// rom_pointer: maps the phase word onto the quarter-wave sine ROM.
//
// The ROM stores only the first quarter of a sine wave (0 to pi/2), so
// the other three quarters are obtained by symmetry. The second phase
// MSB tells whether the phase lies in a rising quarter (first, third) or
// a falling quarter (second, fourth); for a falling quarter the address
// bits are ones' complemented, which reads the table backwards. The
// phase MSB says whether the phase is in the negative half wave and is
// passed on as the sign. The address is taken from the eight bits
// directly below the two quadrant bits; the lowest PHASE_W-10 phase
// bits (two at the default size) are not used for the lookup.
//
// Because the ROM samples sit at half-step positions (see sine_rom),
// complementing the address gives an exact mirror of the quarter, so the
// folded wave is symmetric.
//
// Interface: phase (PHASE_W bits) -> addr (ADDR_W bits), neg. Purely
// combinational.
module rom_pointer #(
  parameter int unsigned PHASE_W = dds_pkg::PHASE_W,
  parameter int unsigned ADDR_W  = dds_pkg::ADDR_W
) (
  input  logic [PHASE_W-1:0] phase,
  output logic [ADDR_W-1:0]  addr,
  output logic               neg
);
  timeunit 1ns; timeprecision 1ps;


  logic mirror;

  always_comb begin
    neg    = phase[PHASE_W-1];
    mirror = phase[PHASE_W-2];
    addr   = phase[PHASE_W-3 -: ADDR_W] ^ {ADDR_W{mirror}};
  end

endmodule
