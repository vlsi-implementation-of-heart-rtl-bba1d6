// div_ovf_detect: division overflow detector.
//
// After the first shift-and-add/subtract step of a division, overflow is decided
// from four bits: ZF (the partial remainder is zero, i.e. |X| = |Z|), DSR (sign of
// the dividend), X(msb) (sign of the divisor) and Q(msb) (the first quotient bit).
// The quotient fits only if its first bit is the one expected for the signs of
// dividend and divisor; when |X| = |Z| it fits only for a negative quotient.
//
// DIV_OVF = ZF&~DSR | ZF&Xm | DSR&Xm&Qm | DSR&~Xm&~Qm | ~DSR&Xm&~Qm | ~DSR&~Xm&Qm
// which is the minimised form of the processor's truth table (don't-care rows take
// the value of this expression). Purely combinational.
module div_ovf_detect (
  input  logic zf,
  input  logic dsr,
  input  logic x_msb,
  input  logic q_msb,
  output logic div_ovf
);
  always_comb begin
    div_ovf = (zf & ~dsr) | (zf & x_msb)
            | (dsr & x_msb & q_msb) | (dsr & ~x_msb & ~q_msb)
            | (~dsr & x_msb & ~q_msb) | (~dsr & ~x_msb & q_msb);
  end
endmodule
