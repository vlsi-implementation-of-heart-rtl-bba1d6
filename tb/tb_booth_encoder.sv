// tb_booth_encoder: self-checking test of the radix-4 Booth partial products.
//
// For corner operands and random pairs, adds the eight rows and the separate +1
// of the last row (weight 2^14) modulo 2^32 and compares with the signed product.
// Also checks each row's selected multiple against the recoding table
// (0, +-1, +-2 times the multiplicand) for the digit of its bit group.
module tb_booth_encoder;
  logic [15:0] a, b;
  logic [31:0] rows [8];
  logic        neg_last;
  int checks = 0, failures = 0;

  booth_encoder dut (.a, .b, .rows, .neg_last);

  task automatic check(input logic [15:0] ta, tb_);
    logic [31:0] acc, expv;
    a = ta; b = tb_;
    #1;
    acc = neg_last ? 32'h4000 : 32'h0;
    for (int i = 0; i < 8; i++) acc += rows[i];
    expv = 32'($signed(ta) * $signed(tb_));
    checks++;
    if (acc !== expv) begin
      failures++;
      $display("FAIL %h * %h: rows sum to %h, expected %h", ta, tb_, acc, expv);
    end
    // digit of group i: -2*b[2i+1] + b[2i] + b[2i-1]
    for (int i = 0; i < 8; i++) begin
      int d;
      logic [16:0] ppbits;
      logic [31:0] want;
      d = -2 * int'(tb_[2*i+1]) + int'(tb_[2*i]) + ((i == 0) ? 0 : int'(tb_[2*i-1]));
      want = 32'(d * $signed(ta));
      ppbits = rows[i][2*i +: 17];
      if (i > 0) ppbits[16] = ~ppbits[16];   // row 0 keeps its sign bit as is
      // one's complement row plus its +1 (set for every group with b[2i+1]=1) gives
      // the digit times a
      checks++;
      if (17'(ppbits + 17'(tb_[2*i+1])) !== want[16:0]) begin
        failures++;
        $display("FAIL row %0d of %h*%h: %h exp %h", i, ta, tb_, ppbits, want[16:0]);
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
    check(16'h8000, 16'h8000);
    check(16'h7FFF, 16'h8000);
    check(16'hFFFF, 16'hFFFF);
    check(16'hFFC6, 16'hFFA1);
    check(16'h001C, 16'h0011);
    for (int i = 0; i < 1000; i++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
