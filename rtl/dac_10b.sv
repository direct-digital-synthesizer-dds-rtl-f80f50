// dac_10b: behavioural model of the on-chip 10-bit digital-to-analog
// converter. This is not synthesizable logic; it models an analog part.
//
// The real converter sums the ten digital inputs in a resistor network
// whose summing node is held at a DC bias by one buffer, while a second
// buffer drives the output pin so that the load does not disturb the
// network. This model keeps only the static transfer function: an ideal
// linear converter whose full code range 0..1023 spans VLOW..VHIGH,
//   vout = VLOW + code * (VHIGH - VLOW) / 1023,
// i.e. a 3 V to 4 V swing centred on the 3.5 V bias, as the design
// description gives. Settling, slew, load (it was characterised with
// 20 pF) and distortion are not modelled; the output follows the code
// after a fixed DELAY_NS delay.
//
// Interface: code (10 bits) -> vout (real, volts).
module dac_10b #(
  parameter int unsigned DAC_W    = dds_pkg::DAC_W,
  parameter real         VLOW     = 3.0,
  parameter real         VHIGH    = 4.0,
  parameter int unsigned DELAY_NS = 1
) (
  input  logic [DAC_W-1:0] code,
  output real              vout
);
  timeunit 1ns; timeprecision 1ps;


  localparam real FULL_SCALE = real'((2**DAC_W) - 1);

  real v_ideal;

  always_comb v_ideal = VLOW + real'(code) * (VHIGH - VLOW) / FULL_SCALE;

  always @(v_ideal) vout <= #(DELAY_NS * 1ns) v_ideal;

  initial vout = VLOW + (VHIGH - VLOW) / 2.0;

endmodule
