// compressor_row: one level of the Wallace tree, a row of 4-2 compressors.
//
// Reduces four WIDTH-bit rows of equal weight to a sum row and a carry row; the
// carry row is returned already shifted one place left (its bit 0 is zero). The
// cout of each column feeds the cin of the next; the cout and co of the top column
// carry weight 2^WIDTH and are dropped, which is exact for sums taken modulo
// 2^WIDTH (the products of the multiplier fit in 32 bits).
// Purely combinational.
module compressor_row #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] r0,
  input  logic [WIDTH-1:0] r1,
  input  logic [WIDTH-1:0] r2,
  input  logic [WIDTH-1:0] r3,
  output logic [WIDTH-1:0] sum,
  output logic [WIDTH-1:0] carry
);
  logic [WIDTH:0]   cin;
  logic [WIDTH-1:0] co;

  assign cin[0] = 1'b0;
  for (genvar j = 0; j < WIDTH; j++) begin : g_col
    compressor_4_2 u_c (
      .x1(r0[j]), .x2(r1[j]), .x3(r2[j]), .x4(r3[j]), .cin(cin[j]),
      .sum(sum[j]), .co(co[j]), .cout(cin[j+1])
    );
  end
  assign carry = {co[WIDTH-2:0], 1'b0};

  logic unused_top;
  assign unused_top = co[WIDTH-1] ^ cin[WIDTH];
endmodule
