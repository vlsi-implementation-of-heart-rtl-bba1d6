// compressor_4_2: 4-2 compressor of the multiplier's reduction tree.
//
// Two cascaded full adders: the first adds x1, x2, x3 and gives its carry as cout,
// which depends only on those three inputs and so never ripples along a row; the
// second adds the first sum, x4 and cin (the cout of the next lower column) and
// gives sum and co. Weights: sum has the column's weight, co and cout one place
// higher. x1+x2+x3+x4+cin = sum + 2*(co+cout).
// Purely combinational. The two-full-adder structure and the port names
// x1..x4, cin, sum, co, cout are those of the processor's compressor cell.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic co,
  output logic cout
);
  logic s1;
  always_comb begin
    s1   = x1 ^ x2 ^ x3;
    cout = (x1 & x2) | (x1 & x3) | (x2 & x3);
    sum  = s1 ^ x4 ^ cin;
    co   = (s1 & x4) | (s1 & cin) | (x4 & cin);
  end
endmodule
