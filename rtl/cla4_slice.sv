// cla4_slice: 4-bit slice of the carry-look-ahead adder.
//
// Forms the bit generate (a&b) and propagate (a^b) terms, the three internal
// carries from the slice carry-in, the four sum bits, and the group generate and
// propagate terms used by the look-ahead carry generator above it.
// Purely combinational. The slice structure (4-bit groups with G/P outputs)
// follows the processor's adder; the gate-level form is standard look-ahead logic.
module cla4_slice (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       gg,  // group generate
  output logic       gp   // group propagate
);
  logic [3:0] g, p;
  logic [3:0] c;

  always_comb begin
    g = a & b;
    p = a ^ b;
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    s    = p ^ c;
    gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    gp   = &p;
  end
endmodule
