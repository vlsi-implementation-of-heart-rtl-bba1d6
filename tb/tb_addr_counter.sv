// tb_addr_counter: self-checking test of the 7-bit address register.
//
// Random sequences of load, preset (SET low), count up, count down and hold are
// applied, one per clock, and the register is compared with a reference value
// kept by the testbench after every edge (including wrap-around at 0 and 127).
module tb_addr_counter;
  logic clk = 0, en, load, set_n, down;
  logic [6:0] d, q, ref_q;
  int checks = 0, failures = 0;

  addr_counter dut (.clk, .en, .load, .set_n, .down, .d, .q);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; load = 1; set_n = 1; down = 0; d = 7'h00;
    @(negedge clk); ref_q = 7'h00;
    for (int i = 0; i < 2000; i++) begin
      en = 1'($urandom % 4 != 0); load = 1'($urandom % 3 == 0);
      set_n = 1'($urandom % 4 != 0); down = 1'($urandom); d = 7'($urandom);
      @(negedge clk);
      if (en) begin
        if (load)      ref_q = set_n ? d : 7'h7F;
        else if (down) ref_q = ref_q - 7'd1;
        else           ref_q = ref_q + 7'd1;
      end
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL step %0d: q=%h expected %h", i, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
