// sine_rom: 256 x 8 quarter-wave sine magnitude table (256-byte ROM).
//
// Entry i holds round(255 * sin((i + 0.5) * pi / 512)) for i = 0..255,
// i.e. the first quarter of a sine wave sampled at the centres of 256
// equal steps and scaled to 8 bits (values 1..255). Sampling at the step
// centres, rather than at the step edges, makes entry 255-i the mirror of
// entry i, which the ROM pointer relies on when it reads a falling
// quarter backwards. The contents are computed at elaboration time by a
// constant function, so the table needs no data file and any synthesis
// tool sees a constant ROM; for other sizes the same formula is used with
// 2**ADDR_W entries and 2**DATA_W - 1 as full scale.
//
// The read is asynchronous (combinational), as for a mask ROM; the
// registers that follow it are in sine_lut. The 8-bit word and 256-entry
// depth follow the design description; the sample positions and scaling
// are this design's choice.
//
// Interface: addr (ADDR_W bits) -> data (DATA_W bits).
module sine_rom #(
  parameter int unsigned ADDR_W = dds_pkg::ADDR_W,
  parameter int unsigned DATA_W = dds_pkg::MAG_W
) (
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] data
);
  timeunit 1ns; timeprecision 1ps;

  localparam int unsigned DEPTH = 2**ADDR_W;
  localparam real         PI    = 3.14159265358979323846;

  typedef logic [DATA_W-1:0] table_t [DEPTH];

  function automatic table_t quarter_sine();
    table_t t;
    real full_scale, angle;
    full_scale = real'((2**DATA_W) - 1);
    for (int i = 0; i < DEPTH; i++) begin
      angle = (real'(i) + 0.5) * PI / (2.0 * real'(DEPTH));
      t[i]  = DATA_W'($rtoi(full_scale * $sin(angle) + 0.5));
    end
    return t;
  endfunction

  localparam table_t ROM = quarter_sine();

  assign data = ROM[addr];

endmodule
