// sine_lut: the sine look-up block between the ROM pointer and the DAC.
//
// It reads the quarter-wave magnitude from sine_rom, converts magnitude
// and half-wave sign into the DAC's 10-bit offset-binary code
// (dds_pkg::dac_code: 512 + 2*mag for the positive half, 511 - 2*mag for
// the negative half) and holds the code in a 10-bit falling-edge latch,
// so that all DAC input bits change together, on the same clock edge,
// whatever the different path delays through the ROM were.
//
// The output latches follow the design description; the exact code
// mapping from an 8-bit magnitude to a 10-bit DAC word is this design's
// choice.
//
// Interface: clk, rst_n (synchronous, active low; clears the code to 0),
// addr (8 bits), neg -> code (10 bits). Latency: code reflects addr/neg
// one falling edge later.
module sine_lut #(
  parameter int unsigned ADDR_W = dds_pkg::ADDR_W,
  parameter int unsigned MAG_W  = dds_pkg::MAG_W,
  parameter int unsigned DAC_W  = dds_pkg::DAC_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] addr,
  input  logic              neg,
  output logic [DAC_W-1:0]  code
);
  timeunit 1ns; timeprecision 1ps;


  dds_pkg::mag_t      mag;
  dds_pkg::dac_code_t code_d;

  sine_rom #(.ADDR_W(ADDR_W), .DATA_W(MAG_W)) u_rom (
    .addr (addr),
    .data (mag)
  );

  always_comb code_d = dds_pkg::dac_code(neg, mag);

  nedge_latch #(.WIDTH(DAC_W)) u_out_latch (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (code_d),
    .q     (code)
  );

  initial begin
    assert (MAG_W == dds_pkg::MAG_W && DAC_W == dds_pkg::DAC_W)
      else $error("sine_lut: code mapping is defined for 8-bit magnitude, 10-bit DAC");
  end

endmodule
