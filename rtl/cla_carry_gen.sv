// cla_carry_gen: look-ahead carry generator for four groups.
//
// From four (generate, propagate) pairs and a carry-in it forms the carries into
// groups 1..3 and the generate/propagate pair of the four groups together. The
// 32-bit adder uses two of these on its 4-bit slices (carries at bits 4, 8, 12 and
// 20, 24, 28) and one more on their outputs (carry at bit 16).
// Purely combinational.
module cla_carry_gen (
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic       cin,
  output logic [3:1] c,
  output logic       gg,
  output logic       gp
);
  always_comb begin
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    gp   = &p;
  end
endmodule
