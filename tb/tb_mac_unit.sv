// tb_mac_unit: self-checking test of the multiplier registers MU1/MU2/MU3.
//
// Drives random sequences of shift and MU3-load and keeps a reference pipeline:
// on shift MU1 <- din and MU2 <- MU1; on load MU3 <- MU1*MU2 using the values from
// before the edge. The two rows of MU3 must add up to the reference product.
module tb_mac_unit;
  logic clk = 0, rst, shift, mu3_ld;
  logic [15:0] din, mu1, mu2, r1, r2;
  logic [31:0] mu3_sum, r3;
  logic [30:0] mu3_carry;
  int checks = 0, failures = 0;

  mac_unit dut (.clk, .rst, .shift, .mu3_ld, .din, .mu1, .mu2, .mu3_sum, .mu3_carry);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; shift = 0; mu3_ld = 0; din = 0;
    @(negedge clk); rst = 0;
    r1 = 0; r2 = 0; r3 = 0;
    for (int i = 0; i < 3000; i++) begin
      shift = 1'($urandom); mu3_ld = 1'($urandom); din = 16'($urandom);
      @(negedge clk);
      if (mu3_ld) r3 = 32'($signed(r1) * $signed(r2));
      if (shift) begin r2 = r1; r1 = din; end
      checks++;
      if (mu1 !== r1 || mu2 !== r2 || mu3_sum + {mu3_carry, 1'b0} !== r3) begin
        failures++;
        $display("FAIL step %0d: mu1=%h mu2=%h mu3=%h expected %h %h %h", i, mu1, mu2,
                 mu3_sum + {mu3_carry, 1'b0}, r1, r2, r3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
