// tb_cla_adder32: self-checking test of the 32-bit carry-look-ahead adder.
//
// Compares sum, carry out and the carry out of bit 15 with the results of the
// simulator's own arithmetic for the worst-case carry chain (80000000h+7FFFFFFFh
// with carry-in, i.e. a subtraction of 80000001h), corner values and 2000 random
// operand pairs, in 32-bit mode and in split mode (upper half as an independent
// 16-bit adder/subtractor). A watchdog ends the run if it does not finish.
module tb_cla_adder32;
  logic [31:0] a, b, s;
  logic        sub, split, cout, c16;
  int checks = 0, failures = 0;

  cla_adder32 dut (.a, .b, .sub, .split, .s, .cout, .c16);

  task automatic check(input logic [31:0] ta, tb_, input logic tsub, tsplit);
    logic [32:0] full;
    logic [16:0] lo, hi;
    logic [31:0] bx;
    a = ta; b = tb_; sub = tsub; split = tsplit;
    #1;
    bx   = tsub ? ~tb_ : tb_;
    full = {1'b0, ta} + {1'b0, bx} + 33'(tsub);
    lo   = {1'b0, ta[15:0]} + {1'b0, bx[15:0]} + 17'(tsub);
    hi   = {1'b0, ta[31:16]} + {1'b0, bx[31:16]} + 17'(tsub);
    checks++;
    if (!tsplit) begin
      if (s !== full[31:0] || cout !== full[32] || c16 !== lo[16]) begin
        failures++;
        $display("FAIL a=%h b=%h sub=%b: s=%h cout=%b c16=%b exp %h %b %b",
                 ta, tb_, tsub, s, cout, c16, full[31:0], full[32], lo[16]);
      end
    end else begin
      if (s[31:16] !== hi[15:0] || cout !== hi[16] || s[15:0] !== lo[15:0]) begin
        failures++;
        $display("FAIL split a=%h b=%h sub=%b: s=%h cout=%b", ta, tb_, tsub, s, cout);
      end
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
    // worst case: the carry ripples through all 32 bits
    check(32'h8000_0000, 32'h8000_0000, 1'b1, 1'b0);  // 80000000 + 7FFFFFFF + 1
    if (s !== 32'h0000_0000 || cout !== 1'b1) begin failures++; $display("FAIL worst case"); end
    checks++;
    check(32'hFFFF_FFFF, 32'h0000_0001, 1'b0, 1'b0);
    check(32'h0000_FFFF, 32'h0000_0001, 1'b0, 1'b0);
    check(32'h0000_FFFF, 32'h0000_0001, 1'b0, 1'b1);  // split: no carry into bit 16
    if (s[31:16] !== 16'h0000) begin failures++; $display("FAIL split isolation"); end
    checks++;
    check(32'h1234_0000, 32'h1234_0000, 1'b1, 1'b1);
    for (int i = 0; i < 2000; i++)
      check($urandom, $urandom, 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
