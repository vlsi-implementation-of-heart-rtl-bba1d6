// mac_unit: the multiplier registers MU1, MU2 and MU3.
//
// MU1 and MU2 form a two-stage shift register for the operands: on shift, MU1
// takes the new value and MU2 takes the old MU1. On mu3_ld, MU3 takes the
// carry-save product of the old MU1 and MU2 from multiplier16. Because MU3 is
// loaded with the operands present before the same edge, a product enters MU3 one
// instruction after its second operand, and reaches the accumulator one
// instruction later still: one instruction both starts a new product and
// accumulates the previous one.
//
// MU3 is 63 bits: a 32-bit sum row and a 31-bit carry row (weight 2).
// Interface: rising-edge clk, synchronous active-high rst (clears all three).
// The register set and the two-row MU3 follow the processor; the 32/31 split of
// MU3 is this design's reading of its 63-bit width.
module mac_unit #(
  parameter int W = 16
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           shift,
  input  logic           mu3_ld,
  input  logic [W-1:0]   din,
  output logic [W-1:0]   mu1,
  output logic [W-1:0]   mu2,
  output logic [2*W-1:0] mu3_sum,
  output logic [2*W-2:0] mu3_carry
);
  logic [2*W-1:0] p_sum;
  logic [2*W-2:0] p_carry;

  multiplier16 #(.W(W)) u_mul (.a(mu1), .b(mu2), .sum_row(p_sum), .carry_row(p_carry));

  always_ff @(posedge clk) begin
    if (rst) begin
      mu1       <= '0;
      mu2       <= '0;
      mu3_sum   <= '0;
      mu3_carry <= '0;
    end else begin
      if (shift) begin
        mu1 <= din;
        mu2 <= mu1;
      end
      if (mu3_ld) begin
        mu3_sum   <= p_sum;
        mu3_carry <= p_carry;
      end
    end
  end
endmodule
