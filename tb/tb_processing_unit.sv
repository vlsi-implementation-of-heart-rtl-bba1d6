// tb_processing_unit: self-checking test of the processing unit on its own.
//
// The testbench plays the control unit: it presents one control word per clock
// (changed on the falling edge, executed on the rising edge) and drives the RAM
// output latch ml directly. Checked against values computed here:
//  * register loads from the latch, ADD and SUB with the signed-overflow flag;
//  * the multiply-accumulate pipeline: with MU1 = MU2 = 1 a clear followed by an
//    accumulation gives 0 (the cleared accumulator holds -1), then a*b and a
//    second product are accumulated, and BG reports a sum wider than 16 bits;
//  * a full 16-step division (the subroutine's sequence of SHL, MV Y,Z, DIV1,
//    DIV2 words) giving (2*D/X) | 1, with and without division overflow;
//  * the A1 and RAM control outputs for load, count and write words.
module tb_processing_unit;
  import mesa_pkg::*;

  logic        clk = 1'b0, rst;
  cur_t        cur;
  logic [6:0]  car;
  logic [15:0] ml;
  logic        a1_en, a1_load, a1_set_n, a1_down;
  logic [6:0]  a1_d;
  logic        mem_cs, mem_we, mem_page;
  logic [15:0] mem_wdata, co1, co2;
  logic        bg, add_ovf, div_ovf;
  logic [31:0] acc;
  int checks = 0, failures = 0;

  processing_unit dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // present a control word for one clock
  task automatic exec(input cur_t c);
    @(negedge clk);
    cur = c;
    @(posedge clk);
    #1;
  endtask

  function automatic cur_t w_ml(input dst_e d);
    cur_t c = CUR_NOP;
    c.src = SRC_ML; c.dst = d;
    return c;
  endfunction
  function automatic cur_t w_acc(input acc_e a);
    cur_t c = CUR_NOP;
    c.acc = a;
    return c;
  endfunction
  function automatic cur_t w_mu(input src_e s, input logic ld, input acc_e a);
    cur_t c = CUR_NOP;
    c.src = s; c.mu_shift = 1'b1; c.mu3_ld = ld; c.acc = a;
    return c;
  endfunction
  function automatic cur_t w_yz();
    cur_t c = CUR_NOP;
    c.src = SRC_Z; c.dst = DST_Y; c.dsr_ld = 1'b1;
    return c;
  endfunction

  // load MU1 = a, MU2 = b (a shifted in last) then form ZW = a*b
  task automatic make_product(input logic [15:0] a, input logic [15:0] b);
    ml = 16'd1;
    exec(w_mu(SRC_ML, 1'b0, ACC_HOLD));
    exec(w_mu(SRC_ML, 1'b0, ACC_HOLD));            // MU1 = MU2 = 1
    ml = b;
    exec(w_mu(SRC_ML, 1'b1, ACC_CLR));             // MU3 = 1, ZW = -1, MU1 = b
    ml = a;
    exec(w_mu(SRC_ML, 1'b0, ACC_MAC));             // ZW = 0, MU1 = a, MU2 = b
    exec(w_mu(SRC_ML, 1'b1, ACC_HOLD));            // MU3 = a*b
    exec(w_acc(ACC_MAC));                          // ZW = a*b
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cur = CUR_NOP; car = 7'h00; ml = 16'h0; rst = 1'b1;
    @(posedge clk); @(posedge clk); #1;
    rst = 1'b0;
    check(acc == 32'hFFFF_FFFF, "reset leaves the accumulator at -1 (stored zeros)");

    // ---------------- ADD / SUB
    for (int i = 0; i < 200; i++) begin
      logic [15:0] x, y;
      logic signed [16:0] s, d;
      x = 16'($urandom); y = 16'($urandom);
      ml = x; exec(w_ml(DST_X));
      ml = y; exec(w_ml(DST_Y));
      exec(w_acc(ACC_ADD));
      s = 17'($signed(y)) + 17'($signed(x));
      check(acc[31:16] == 16'(s) && add_ovf == (s > 32767 || s < -32768),
            $sformatf("ADD %h+%h -> %h ovf %b", y, x, acc[31:16], add_ovf));
      exec(w_acc(ACC_SUB));
      d = 17'($signed(y)) - 17'($signed(x));
      check(acc[31:16] == 16'(d) && add_ovf == (d > 32767 || d < -32768),
            $sformatf("SUB %h-%h -> %h ovf %b", y, x, acc[31:16], add_ovf));
      exec(CUR_NOP);
      check(!add_ovf, "ADD_OVF lasts one instruction");
    end

    // ---------------- MAC and BG
    for (int i = 0; i < 100; i++) begin
      logic [15:0] a, b, c, e;
      logic signed [31:0] p;
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom); e = 16'($urandom);
      make_product(a, b);
      p = $signed(a) * $signed(b);
      check(acc == 32'(p), $sformatf("MAC %h*%h = %h exp %h", a, b, acc, p));
      check(bg == !(p >= -32768 && p <= 32767), "BG after one product");
      // accumulate c*e on top
      ml = c; exec(w_mu(SRC_ML, 1'b0, ACC_HOLD));
      ml = e; exec(w_mu(SRC_ML, 1'b0, ACC_HOLD));
      exec(w_mu(SRC_ML, 1'b1, ACC_HOLD));
      exec(w_acc(ACC_MAC));
      p = p + $signed(c) * $signed(e);
      check(acc == 32'(p), $sformatf("MAC sum = %h exp %h", acc, p));
    end

    // ---------------- SHL: value 2v+1
    begin
      logic [31:0] v;
      v = acc;
      exec(w_acc(ACC_SHL));
      check(acc == {v[30:0], 1'b1}, "SHL shifts in a one");
    end

    // ---------------- division
    for (int i = 0; i < 60; i++) begin
      logic [15:0] a, b, x, q;
      logic [31:0] d;
      bit          expect_ovf;
      a = 16'($urandom_range(30000, 1)); b = 16'($urandom_range(30000, 1));
      d = 32'(a) * 32'(b);
      if (i % 3 == 2) x = 16'($urandom_range(100, 1));                 // overflows
      else            x = 16'(32'($urandom_range(32767 - 16'(d >> 15), 0)) + (d >> 15) + 1);
      // no overflow while the quotient 2D/X fits in 16 bits: |X| > |2Z + W(msb)|
      expect_ovf = ((2 * 64'(d)) / x) >= 64'd65536;
      make_product(a, b);
      ml = x; exec(w_ml(DST_X));
      exec(w_acc(ACC_SHL));
      exec(w_yz());
      exec(w_acc(ACC_DIV1));
      check(div_ovf == expect_ovf, $sformatf("DIV_OVF=%b for %h / %h", div_ovf, d, x));
      exec(w_acc(ACC_SHL));
      for (int k = 0; k < 15; k++) begin
        exec(w_yz());
        exec(w_acc(ACC_DIV2));
        exec(w_acc(ACC_SHL));
      end
      q = 16'((2 * d) / x) | 16'h1;
      if (!expect_ovf)
        check(acc[15:0] == q, $sformatf("quotient %h / %h = %h exp %h", d, x, acc[15:0], q));
    end

    // ---------------- A1, A2 and memory control
    begin
      cur_t c;
      c = CUR_NOP; c.a1 = A1_INC;
      @(negedge clk); cur = c; #1;
      check(a1_en && !a1_load && !a1_down, "A1 count up");
      c.a1 = A1_DEC; cur = c; #1;
      check(a1_en && !a1_load && a1_down, "A1 count down");
      c.a1 = A1_SET; cur = c; #1;
      check(a1_en && a1_load && !a1_set_n, "A1 preset");
      car = 7'h5A; c.a1 = A1_LD_CAR; cur = c; #1;
      check(a1_en && a1_load && a1_set_n && a1_d == 7'h5A, "A1 from C.A.R.");
      c = CUR_NOP; c.src = SRC_W; c.mem_wr = 1'b1; c.page = 1'b1; cur = c; #1;
      check(mem_cs && mem_we && mem_page && mem_wdata == acc[15:0], "write W to page 1");
      ml = 16'h0042; c = w_ml(DST_A2); c.dst = DST_NONE; c.a2 = A2_LD_BUS; cur = c;
      @(posedge clk); #1;
      @(negedge clk); c = CUR_NOP; c.a2 = A2_INC; cur = c;
      @(posedge clk); #1;
      @(negedge clk); c = CUR_NOP; c.a1 = A1_LD_A2; cur = c; #1;
      check(a1_d == 7'h43, "A2 load, count and move to A1");
      ml = 16'hBEEF; exec(w_ml(DST_CO1));
      ml = 16'h1234; exec(w_ml(DST_CO2));
      check(co1 == 16'hBEEF && co2 == 16'h1234, "CO1/CO2 loads");
      exec(CUR_NOP);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
