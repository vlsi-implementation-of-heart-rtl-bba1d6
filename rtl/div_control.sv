// div_control: operation choice and quotient bit of the non-restoring divider.
//
// First step (DIV1): subtract the divisor if the partial remainder (dividend) and
// the divisor have the same sign, otherwise add; i.e. sub = ~(DSR ^ X(msb)).
// Following steps (DIV2): subtract if the previous quotient bit is 1, add if it
// is 0. The new quotient bit is 1 when the new partial remainder has the sign of
// the divisor: q = ~(R(msb) ^ X(msb)).
//
// Interface: first selects DIV1; dsr, x_msb, q_prev and the result sign sum_msb
// in; sub and q out. Purely combinational: sub feeds the adder, whose result sign
// comes back as sum_msb in the same cycle.
//
// The add/subtract rule follows the processor's division table. The processor
// derives the quotient bit from the adder's carry out; the sign form used here
// gives the same bit whenever the step does not overflow, and needs no knowledge of
// the adder's carry in split mode.
module div_control (
  input  logic first,
  input  logic dsr,
  input  logic x_msb,
  input  logic q_prev,
  input  logic sum_msb,
  output logic sub,
  output logic q
);
  always_comb begin
    sub = first ? ~(dsr ^ x_msb) : q_prev;
    q   = ~(sum_msb ^ x_msb);
  end
endmodule
