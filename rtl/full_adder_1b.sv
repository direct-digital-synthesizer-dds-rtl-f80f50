// full_adder_1b: one bit cell of the carry-lookahead adder.
//
// Given operand bits a, b and the carry c into this bit (supplied by the
// lookahead unit, not rippled from the neighbouring cell), it forms the
// sum bit s = a ^ b ^ c, and hands the lookahead unit the bit's
// generate g = a & b (this bit makes a carry by itself) and propagate
// p = a | b (this bit passes an incoming carry on). OR is used for
// propagate, as in the design description; it gives the same carries as
// XOR, because whenever a and b are both 1 the generate term already
// produces the carry.
//
// Interface: a, b, c -> s, g, p. Purely combinational.
module full_adder_1b (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic g,
  output logic p
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    s = a ^ b ^ c;
    g = a & b;
    p = a | b;
  end

endmodule
