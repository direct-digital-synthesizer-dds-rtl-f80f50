// cla_adder4: 4-bit carry-lookahead adder, the slice from which the phase
// accumulator is built.
//
// Four full_adder_1b bit cells each produce a generate (a & b) and a
// propagate (a | b) term. The carry_lookahead4 unit turns those and the
// slice carry-in into the carry for every bit at once, in flat
// sum-of-products form, and the bit cells then form their sum bits
// a ^ b ^ c. Nothing ripples inside the slice; slices are chained by
// their carry-in / carry-out.
//
// Interface: a, b (4 bits), cin -> sum (4 bits), cout. Purely
// combinational.
module cla_adder4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout
);
  timeunit 1ns; timeprecision 1ps;

  logic [3:0] g, p, c;

  for (genvar i = 0; i < 4; i++) begin : g_bit
    full_adder_1b u_fa (
      .a (a[i]),
      .b (b[i]),
      .c (c[i]),
      .s (sum[i]),
      .g (g[i]),
      .p (p[i])
    );
  end

  carry_lookahead4 u_cla (
    .g    (g),
    .p    (p),
    .cin  (cin),
    .c    (c),
    .cout (cout)
  );

endmodule
