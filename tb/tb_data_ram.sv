// tb_data_ram: self-checking test of the 256 x 16 data RAM and its output latch.
//
// Writes random data to both pages, reads it back in random order with one access
// per clock, checks that the latch shows the word on the edge after the read, and
// that it holds its value through writes and idle cycles.
module tb_data_ram;
  logic clk = 0, rst, cs, we;
  logic [7:0]  addr;
  logic [15:0] wdata, q;
  logic [15:0] model [256];
  int checks = 0, failures = 0;

  data_ram dut (.clk, .rst, .cs, .we, .addr, .wdata, .q);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; cs = 0; we = 0; addr = 0; wdata = 0;
    @(negedge clk); rst = 0;
    for (int i = 0; i < 256; i++) begin
      cs = 1; we = 1; addr = 8'(i); wdata = 16'($urandom); model[i] = wdata;
      @(negedge clk);
    end
    for (int i = 0; i < 1000; i++) begin
      logic [15:0] held;
      cs = 1; we = 0; addr = 8'($urandom);
      @(negedge clk);
      checks++;
      if (q !== model[addr]) begin
        failures++;
        $display("FAIL read %h: %h expected %h", addr, q, model[addr]);
      end
      // a write or an idle cycle must leave the latch alone
      held = q;
      cs = 1'($urandom); we = 1'b1; addr = 8'($urandom); wdata = 16'($urandom);
      if (cs && we) model[addr] = wdata;
      @(negedge clk);
      checks++;
      if (q !== held) begin failures++; $display("FAIL latch changed"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
