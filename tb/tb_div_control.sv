// tb_div_control: self-checking test of the divider's operation choice and
// quotient bit.
//
// Part 1 checks the rule exhaustively (first step: subtract when dividend and
// divisor signs agree; later steps: subtract when the previous quotient bit is 1;
// quotient bit 1 when the result has the divisor's sign).
// Part 2 runs complete 16-step non-restoring divisions on random operands with
// the block choosing every step, and compares the recovered quotient with the
// simulator's integer division (positive dividend and divisor, no overflow).
// With the quotient bit taken from the sign of each new remainder, the bit string
// of a non-restoring division equals the restoring quotient.
module tb_div_control;
  logic first, dsr, x_msb, q_prev, sum_msb, sub, q;
  logic exp_sub, exp_q;
  int checks = 0, failures = 0;

  div_control dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      {first, dsr, x_msb, q_prev, sum_msb} = 5'(v);
      #1;
      exp_sub = first ? ~(dsr ^ x_msb) : q_prev;
      exp_q   = ~(sum_msb ^ x_msb);
      checks++;
      if (sub !== exp_sub || q !== exp_q) begin
        failures++;
        $display("FAIL inputs %b: sub=%b q=%b", 5'(v), sub, q);
      end
    end

    for (int t = 0; t < 500; t++) begin
      logic [15:0] x;
      logic [31:0] dvd;
      logic signed [16:0] r;
      logic [15:0] quo;
      int k;
      x   = 16'($urandom_range(32767, 1));
      dvd = $urandom % (32'(x) << 15);    // quotient fits in 15 bits
      r   = 17'($signed({1'b0, dvd[31:16]}));
      quo = '0;
      dsr = 1'b0; x_msb = x[15]; q_prev = 1'b0;
      for (k = 0; k < 16; k++) begin
        // shift in the next dividend bit, then one step
        r = 17'(r <<< 1) | 17'(dvd[15 - k]);
        first = (k == 0);
        #1;
        r = sub ? r - 17'($signed({1'b0, x})) : r + 17'($signed({1'b0, x}));
        sum_msb = r[16];
        #1;
        q_prev = q;
        quo = {quo[14:0], q};
      end
      // with quotient bits taken as the sign of each new remainder, the bit
      // string equals the restoring quotient
      checks++;
      if (quo !== 16'(dvd / 32'(x))) begin
        failures++;
        $display("FAIL %h / %h: got %h expected %h", dvd, x, quo, 16'(dvd / 32'(x)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
