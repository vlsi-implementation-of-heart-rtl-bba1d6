// tb_multiplier16: self-checking test of the Booth / 4-2 compressor multiplier.
//
// sum_row + 2*carry_row, modulo 2^32, must equal the signed 16x16 product for
// corner values (full-scale negative operands, the example ffc6h * ffa1h) and
// 3000 random pairs.
module tb_multiplier16;
  logic [15:0] a, b;
  logic [31:0] sum_row;
  logic [30:0] carry_row;
  int checks = 0, failures = 0;

  multiplier16 dut (.a, .b, .sum_row, .carry_row);

  task automatic check(input logic [15:0] ta, tb_);
    logic [31:0] got, expv;
    a = ta; b = tb_;
    #1;
    got  = sum_row + {carry_row, 1'b0};
    expv = 32'($signed(ta) * $signed(tb_));
    checks++;
    if (got !== expv) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", ta, tb_, got, expv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'hFFC6, 16'hFFA1);   // -58 * -95 = 5510 = 1586h
    if (sum_row + {carry_row, 1'b0} !== 32'h0000_1586) begin
      failures++; $display("FAIL example product");
    end
    checks++;
    check(16'h8000, 16'h8000);
    check(16'h8000, 16'h7FFF);
    check(16'h7FFF, 16'h7FFF);
    check(16'h0001, 16'h0001);
    check(16'h0000, 16'hABCD);
    for (int i = 0; i < 3000; i++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
