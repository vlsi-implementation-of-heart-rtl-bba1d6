// tb_mesa_full: the processor at its default parameters running its own ROM program.
//
// Loads 100 samples of a test signal (an offset of 100 plus three sinusoids,
// amplitudes 1, 0.5 and 0.25
// of 1000 counts, at 1/20, 1/10 and 1/5 of the sampling rate) into page 0 from
// address 1, the sample count into address 0, and the constants the program reads
// (page 0 7Fh = 4000h, page 1 7Fh = 1, page 1 0 = 15 for the division loop, page 1
// 7Dh = model order 4). It then releases RESET and follows the program through
// its first stage, the mean value of the samples, up to the return from the first
// call of the division subroutine. Checks: the dividend handed to the subroutine
// is the sample sum, the divisor is the sample count, the quotient returned in W
// is the non-restoring result (2*D/X) | 1, the subroutine takes 100 clock cycles
// from its first word to the word after the call, and OVF stays low.
module tb_mesa_full;
  logic        clk = 1'b0, reset;
  logic        aen, l_c, set_n, u_d_n, p1_0, ms, r_w;
  logic [6:0]  ad_in;
  logic [8:0]  d_in;
  logic [15:0] data_out;
  logic        data_oe, ready, ovf;
  int checks = 0, failures = 0;
  int cycle = 0;

  mesa_processor dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  `include "mesa_tb_host.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one sample of the test signal: sum of three sines, table of 20 phases
  function automatic int sine1000(input int phase20);
    // 1000*sin(2*pi*k/20), k = 0..19
    int t [20] = '{0, 309, 588, 809, 951, 1000, 951, 809, 588, 309,
                   0, -309, -588, -809, -951, -1000, -951, -809, -588, -309};
    return t[phase20 % 20];
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int          sum;
    logic [31:0] d;
    logic [15:0] x, w, q;
    logic [8:0]  ret;
    int          t0, t1;

    pins_idle();
    reset = 1'b1;
    tick(); tick();
    sum = 0;
    host_load_a1(7'd1);
    for (int n = 0; n < 100; n++) begin
      int s;
      s = 100 + sine1000(n) + sine1000(2 * n) / 2 + sine1000(4 * n) / 4;
      sum += s;
      host_write(1'b0, 16'(s), 1'b1, 1'b0);
    end
    host_write_at(1'b0, 7'h00, 16'd100);
    host_write_at(1'b0, 7'h7F, 16'h4000);
    host_write_at(1'b1, 7'h7F, 16'h0001);
    host_write_at(1'b1, 7'h00, 16'd15);
    host_write_at(1'b1, 7'h7D, 16'd4);

    @(posedge clk); #1;
    reset = 1'b0;
    // to the first subroutine call
    while (dut.u_ctrl.pc != 9'h1F0 && cycle < 100000) @(negedge clk);
    t0  = cycle;
    d   = dut.u_pu.acc;
    x   = dut.u_pu.x;
    ret = dut.u_ctrl.st;
    while (dut.u_ctrl.pc != ret && cycle < 100000) @(negedge clk);
    t1  = cycle;
    w   = dut.u_pu.acc[15:0];
    $display("division: D=%h X=%h W=%h in %0d cycles (sample sum %0d)", d, x, w, t1 - t0, sum);
    check($signed(d) == sum, $sformatf("dividend %h is the sample sum %0d", d, sum));
    check(x == 16'd100, $sformatf("divisor %h is the sample count", x));
    q = 16'(($signed(64'($signed(d))) * 2) / $signed(64'(x))) | 16'h1;
    check(w == q, $sformatf("quotient %h expected %h", w, q));
    check(t1 - t0 == 100, $sformatf("division took %0d cycles, expected 100", t1 - t0));
    check(!ovf, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
