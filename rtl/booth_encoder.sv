// booth_encoder: radix-4 (modified Booth) recoding and partial-product generation.
//
// The 16-bit multiplier b is scanned in eight overlapping 3-bit groups
// (b[2i+1], b[2i], b[2i-1], with b[-1] = 0). Each group gives three control
// signals: x1 (select the multiplicand), x2 (select twice the multiplicand) and
// N (negate). Each partial-product bit is ((a[n] & x1) | (a[n-1] & x2)) ^ N, over
// 17 bits (a sign-extended by one bit), so row i is the one's complement of the
// selected multiple when N is set; the missing +1 of that negation is placed as a
// separate bit (neg) at the row's least significant position.
//
// Sign extension uses the add-one method: the sign bit of every row is inverted, a
// 1 is placed above the sign of each row, and a 1 is added at the sign position of
// row 0. Row 0's three upper bits are pre-added (bit16 = s0, bit17 = s0,
// bit18 = ~s0). The +1 of row i (i < 7) is placed in row i+1 at bit 2i, which is
// free there. The +1 of row 7 (weight 2^14) has no free place in an 8-row array
// and is output separately as neg_last.
//
// Output: rows[i] is row i aligned to its weight, 32 bits; the sum of all rows and
// neg_last*2^14, modulo 2^32, is the signed product a*b.
// Purely combinational. The group table (x1, x2, N) and the add-one sign
// extension follow the processor's multiplier; placing the +1 bits is this design's
// own choice.
module booth_encoder #(
  parameter int W = 16
) (
  input  logic [W-1:0]   a,          // multiplicand
  input  logic [W-1:0]   b,          // multiplier
  output logic [2*W-1:0] rows [W/2],
  output logic           neg_last
);
  localparam int NR = W / 2;

  logic [W:0]   ax;                   // sign-extended multiplicand
  logic [NR-1:0] x1, x2, n;
  logic [W:0]   pp [NR];

  always_comb begin
    ax = {a[W-1], a};
    for (int i = 0; i < NR; i++) begin
      logic bh, bm, bl;
      bh = b[2*i+1];
      bm = b[2*i];
      bl = (i == 0) ? 1'b0 : b[2*i-1];
      x1[i] = bm ^ bl;
      x2[i] = (bh & ~bm & ~bl) | (~bh & bm & bl);
      n[i]  = bh;
      for (int k = 0; k <= W; k++) begin
        logic lower;
        lower = (k == 0) ? 1'b0 : ax[k-1];
        pp[i][k] = ((ax[k] & x1[i]) | (lower & x2[i])) ^ n[i];
      end
    end

    for (int i = 0; i < NR; i++) begin
      rows[i] = '0;
      rows[i][2*i +: W] = pp[i][W-1:0];
      if (i == 0) begin
        rows[0][W]   = pp[0][W];
        rows[0][W+1] = pp[0][W];
        rows[0][W+2] = ~pp[0][W];
      end else begin
        rows[i][2*i+W] = ~pp[i][W];
        if (2*i+W+1 < 2*W) rows[i][2*i+W+1] = 1'b1;
        rows[i][2*i-2] = n[i-1];
      end
    end
    neg_last = n[NR-1];
  end
endmodule
