// data_ram: 256 x 16 synchronous static data RAM with output latch.
//
// Two pages of 128 words: the address is {page, A6..A0}. One access per clock:
// on a rising edge with cs=1, we=1 writes wdata, we=0 reads into the output latch
// q. The latch holds the last read word until the next read; the processor uses it
// as its memory latch ML, so an instruction can move the previous read word into a
// register while it starts the next read.
//
// The array contents are not reset; the output latch is cleared by rst.
// Written as a register array: the precharge, sense-amplifier and decoder circuits
// of a full-custom RAM have no RTL counterpart. Size and the output latch follow
// the processor; the write-has-priority single port is this design's own.
module data_ram #(
  parameter int WORDS = 256,
  parameter int W     = 16,
  parameter int AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          cs,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  q
);
  logic [W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (cs && we) mem[addr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst)             q <= '0;
    else if (cs && !we)  q <= mem[addr];
  end
endmodule
