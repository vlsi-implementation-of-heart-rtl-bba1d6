// cla_adder32: 32-bit two-level carry-look-ahead adder/subtractor.
//
// Eight 4-bit slices (cla4_slice) feed two first-level carry generators, which give
// the carries into bits 4, 8, 12 and 20, 24, 28; a second-level generator gives
// the carry into bit 16 and the carry out. An XOR array on input b turns the adder
// into a subtractor (sub=1 inverts b and sets the carry-in).
//
// Split mode: with split=1 the carry into bit 16 is not the look-ahead carry but the
// subtract control, so bits 31..16 form an independent 16-bit adder/subtractor of
// a[31:16] and b[31:16]. The processing unit uses this for ADD, SUB and the division
// steps, and the full 32-bit width for multiply-accumulate.
//
// Interface: a, b, sub, split in; s, cout (carry out of bit 31) and c16 (carry out
// of bit 15) out. Purely combinational.
//
// The slice / two-level generator organisation and the multiplexer at bit 16 follow
// the processor's adder; the port names are this design's own.
module cla_adder32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  input  logic        split,
  output logic [31:0] s,
  output logic        cout,
  output logic        c16
);
  logic [31:0] bx;
  logic [7:0]  sg, sp;      // slice generate / propagate
  logic [8:0]  cs;          // carry into each slice
  logic [1:0]  hg, hp;      // half (16-bit) generate / propagate
  logic        c32;
  logic        c16_la;      // look-ahead carry into bit 16
  logic        unused_gg, unused_gp, unused_c48;

  assign bx = b ^ {32{sub}};
  assign cs[0] = sub;

  for (genvar i = 0; i < 8; i++) begin : g_slice
    cla4_slice u_slice (
      .a  (a[4*i +: 4]),
      .b  (bx[4*i +: 4]),
      .cin(cs[i]),
      .s  (s[4*i +: 4]),
      .gg (sg[i]),
      .gp (sp[i])
    );
  end

  cla_carry_gen u_lo (.g(sg[3:0]), .p(sp[3:0]), .cin(cs[0]), .c(cs[3:1]), .gg(hg[0]), .gp(hp[0]));
  cla_carry_gen u_hi (.g(sg[7:4]), .p(sp[7:4]), .cin(cs[4]), .c(cs[7:5]), .gg(hg[1]), .gp(hp[1]));

  // Second level: only two groups are used; the upper two inputs are tied off.
  logic [3:1] c2;
  assign unused_c48 = c2[3];
  cla_carry_gen u_top (.g({2'b00, hg}), .p({2'b00, hp}), .cin(cs[0]), .c(c2),
                       .gg(unused_gg), .gp(unused_gp));
  assign c16_la = c2[1];
  assign c32    = c2[2];

  assign c16   = c16_la;
  assign cs[4] = split ? sub : c16_la;
  // In split mode the carry out of bit 31 comes from the upper half alone.
  assign cs[8] = split ? (hg[1] | (hp[1] & sub)) : c32;
  assign cout  = cs[8];
endmodule
