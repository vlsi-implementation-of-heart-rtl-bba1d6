// multiplier16: 16x16 two's-complement multiplier producing a carry-save result.
//
// booth_encoder produces eight 32-bit partial-product rows. Two rows of 4-2
// compressors (the first level two rows side by side on rows 0-3 and 4-7, the
// second on their four outputs) reduce them to two rows. The +1 of the last
// negated row (neg_last, weight 2^14) is merged by a final row of full adders.
// The result is left in carry-save form: sum_row + 2*carry_row = a*b (mod 2^32).
// The carry-propagate addition is done later by the shared 32-bit adder, together
// with the accumulation, so no adder is needed here.
//
// Interface: a, b in; sum_row[31:0] and carry_row[30:0] (weights 2^1..2^31) out;
// 63 bits in all, the width of the MU3 register. Purely combinational.
//
// The Booth recoding and the 4-2 compressor tree follow the processor; the full
// adder row for neg_last is this design's own (see booth_encoder).
module multiplier16 #(
  parameter int W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] sum_row,
  output logic [2*W-2:0] carry_row
);
  localparam int PW = 2 * W;

  logic [PW-1:0] rows [W/2];
  logic          neg_last;
  logic [PW-1:0] s1a, c1a, s1b, c1b, s2, c2, nrow, cfa;

  booth_encoder #(.W(W)) u_booth (.a(a), .b(b), .rows(rows), .neg_last(neg_last));

  compressor_row #(.WIDTH(PW)) u_l1a (.r0(rows[0]), .r1(rows[1]), .r2(rows[2]), .r3(rows[3]),
                                      .sum(s1a), .carry(c1a));
  compressor_row #(.WIDTH(PW)) u_l1b (.r0(rows[4]), .r1(rows[5]), .r2(rows[6]), .r3(rows[7]),
                                      .sum(s1b), .carry(c1b));
  compressor_row #(.WIDTH(PW)) u_l2  (.r0(s1a), .r1(c1a), .r2(s1b), .r3(c1b),
                                      .sum(s2), .carry(c2));

  always_comb begin
    nrow = '0;
    nrow[W-2] = neg_last;
    sum_row = s2 ^ c2 ^ nrow;
    cfa     = (s2 & c2) | (s2 & nrow) | (c2 & nrow);
    carry_row = cfa[PW-2:0];
  end

  logic unused_cfa;
  assign unused_cfa = cfa[PW-1];
endmodule
