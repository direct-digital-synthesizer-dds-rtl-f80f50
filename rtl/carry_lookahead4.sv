// carry_lookahead4: carry-lookahead unit of a 4-bit adder slice.
//
// From the four generate/propagate pairs of the bit cells and the slice
// carry-in it computes the carry into every bit and the slice carry-out,
// each as a flat two-level sum of products:
//   c1 = g0 | p0 c0
//   c2 = g1 | p1 g0 | p1 p0 c0
//   c3 = g2 | p2 g1 | p2 p1 g0 | p2 p1 p0 c0
//   c4 = g3 | p3 g2 | p3 p2 g1 | p3 p2 p1 g0 | p3 p2 p1 p0 c0
// so no carry waits on another. The widest product (in c4) has five
// inputs; that fan-in is why the slice is four bits wide.
//
// Interface: g, p (4 bits), cin -> c (4 bits: c[0] = cin, c[i] = carry
// into bit i), cout (carry out of bit 3). Purely combinational.
module carry_lookahead4 (
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic       cin,
  output logic [3:0] c,
  output logic       cout
);
  timeunit 1ns; timeprecision 1ps;

  always_comb begin
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0])
               | (p[2] & p[1] & p[0] & cin);
    cout = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1])
               | (p[3] & p[2] & p[1] & g[0])
               | (p[3] & p[2] & p[1] & p[0] & cin);
  end

endmodule
