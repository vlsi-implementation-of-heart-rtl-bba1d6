// tb_compressor_4_2: exhaustive self-checking test of the 4-2 compressor.
//
// All 32 input combinations: checks x1+x2+x3+x4+cin = sum + 2*(co+cout), and that
// cout does not depend on cin (the property that keeps carries from rippling).
module tb_compressor_4_2;
  logic x1, x2, x3, x4, cin, sum, co, cout;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.*);

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic c0;
      {x1, x2, x3, x4, cin} = 5'(v);
      #1;
      checks++;
      if (int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin) !=
          int'(sum) + 2 * (int'(co) + int'(cout))) begin
        failures++;
        $display("FAIL inputs=%b sum=%b co=%b cout=%b", 5'(v), sum, co, cout);
      end
      c0 = cout;
      cin = ~cin;
      #1;
      checks++;
      if (cout !== c0) begin failures++; $display("FAIL cout depends on cin"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
