// addr_counter: 7-bit address register with load, preset and up/down count.
//
// On a rising clock edge with en=1: load=1 loads d, or presets to all ones when
// set_n=0 as well; load=0 counts, down when down=1, up otherwise, wrapping modulo
// 2^W. With en=0 the value is held. The same block serves as A1 (the RAM address
// register, also driven from the pins AEN, L/C, SET and U/D while the processor is
// in reset) and as A2.
//
// No reset: the register is loaded by the user or the program before it is used.
// The control inputs and their polarity follow the processor's pin list
// (L/C: 1 = load; SET active low; U/D: 0 = up). Wrap-around is this design's own.
module addr_counter #(
  parameter int W = 7
) (
  input  logic         clk,
  input  logic         en,
  input  logic         load,
  input  logic         set_n,
  input  logic         down,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    if (en) begin
      if (load)      q <= set_n ? d : '1;
      else if (down) q <= q - 1'b1;
      else           q <= q + 1'b1;
    end
  end
endmodule
