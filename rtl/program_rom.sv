// program_rom: 512 x 9 program ROM.
//
// Holds the processor's program; the default image is the Burg maximum-entropy
// analysis program with its division subroutine at 1F0h (rtl/mesa_program.hex, one
// 9-bit word per line in hex). The word at addr is latched on the falling clock
// edge, the edge on which the control unit takes its next instruction.
//
// Interface: negedge clk, addr[8:0] in, data[8:0] out (registered).
// Contents follow the processor's ROM listing; the falling-edge read is this
// design's own choice, made so that the instruction register holds the word at the
// program counter.
module program_rom #(
  parameter string INIT_FILE = "rtl/mesa_program.hex",
  parameter int    WORDS     = 512,
  parameter int    W         = 9,
  parameter int    AW        = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [W-1:0]  data
);
  logic [W-1:0] rom [WORDS];

  initial $readmemh(INIT_FILE, rom);

  always_ff @(negedge clk) data <= rom[addr];
endmodule
