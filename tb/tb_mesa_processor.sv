// tb_mesa_processor: end-to-end test of the MESA processor through its pins.
//
// The processor runs a test program (tb/mesa_e2e.hex) that uses every instruction
// group: the multiply-accumulate pipeline (a 6-term dot product in a JNE loop and a
// 2-term sum with the other MAC moves), the division subroutine at 1F0h (the same
// words as the main program image), ADD/SUB, every branch taken and not taken,
// MVI, the flags F1-F4, the A1/A2 register moves, SHL and SHD, and HLT.
// Three runs, each loaded through the pins with RESET=1 and read back the same way:
//   run 0: normal data; all results are checked and OVF must stay low;
//   run 1: the divisor is 3, so the division overflows and OVF must rise;
//   run 2: mode word 1: the program takes the ADD overflow path; OVF must rise.
// Expected values are computed here from the loaded data with the simulator's
// arithmetic. The division quotient is the non-restoring result with its LSB set:
// (2*D / X) | 1 for a dividend D in Z:W and divisor X. The subroutine must take
// 100 clock cycles from its first word to the word after the call.
// Every mechanism below is counted by probing the control word and the control
// unit; one that never happened counts as a failure. A watchdog ends the run.
module tb_mesa_processor;
  import mesa_pkg::*;

  logic        clk = 1'b0, reset;
  logic        aen, l_c, set_n, u_d_n, p1_0, ms, r_w;
  logic [6:0]  ad_in;
  logic [8:0]  d_in;
  logic [15:0] data_out;
  logic        data_oe, ready, ovf;
  int checks = 0, failures = 0;
  int cycle = 0;

  mesa_processor #(.ROM_FILE("tb/mesa_e2e.hex")) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  `include "mesa_tb_host.svh"

  localparam int N = 6;
  localparam logic [8:0] PC_DONE = 9'h0AA, PC_BAD = 9'h0AB;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------ mechanisms
  typedef enum int {
    M_CLR, M_MAC, M_BG, M_ADD, M_SUB, M_DIV1, M_DIV2, M_SHL, M_SHD, M_MRD, M_MWR,
    M_A1INC, M_A1DEC, M_A1SET, M_A1BUS, M_A1A2, M_MVI, M_A2INC, M_A2DEC, M_A2LD,
    M_DSR, M_BNCH, M_RTN, M_JNE_T, M_JNE_N, M_JBG_T, M_JBG_N, M_JLE_T, M_JLE_N,
    M_JLT_T, M_JLT_N, M_JEQ_T, M_JEQ_N, M_JMP, M_JF_T, M_JF_N, M_FSET, M_FRST,
    M_HLT, M_OVF_ADD, M_OVF_DIV, M_HOST_WR, M_HOST_RD, M_HOST_UP, M_HOST_DN,
    M_HOST_SET, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  int run_mode = 0;
  bit ovf_q = 1'b0, bg_q = 1'b0;

  always @(posedge clk) if (!reset) begin
    cur_t c;
    c = dut.cur;
    if (c.acc == ACC_CLR) mech[M_CLR]++;
    if (c.acc == ACC_MAC) mech[M_MAC]++;
    if (c.acc == ACC_ADD) mech[M_ADD]++;
    if (c.acc == ACC_SUB) mech[M_SUB]++;
    if (c.acc == ACC_DIV1) mech[M_DIV1]++;
    if (c.acc == ACC_DIV2) mech[M_DIV2]++;
    if (c.acc == ACC_SHL) mech[M_SHL]++;
    if (c.acc == ACC_SHD) mech[M_SHD]++;
    if (c.mem_rd) mech[M_MRD]++;
    if (c.mem_wr) mech[M_MWR]++;
    if (c.a1 == A1_INC) mech[M_A1INC]++;
    if (c.a1 == A1_DEC) mech[M_A1DEC]++;
    if (c.a1 == A1_SET) mech[M_A1SET]++;
    if (c.a1 == A1_LD_BUS) mech[M_A1BUS]++;
    if (c.a1 == A1_LD_A2) mech[M_A1A2]++;
    if (c.a1 == A1_LD_CAR) mech[M_MVI]++;
    if (c.a2 == A2_INC) mech[M_A2INC]++;
    if (c.a2 == A2_DEC) mech[M_A2DEC]++;
    if (c.a2 == A2_LD_BUS) mech[M_A2LD]++;
    if (c.dsr_ld) mech[M_DSR]++;
  end

  always @(negedge clk) if (!reset) begin
    logic [8:0] ir;
    ir = dut.u_ctrl.ir;
    if (!dut.u_ctrl.f6) begin
      unique case (ir)
        OP_BNCH: mech[M_BNCH]++;
        OP_RTN:  mech[M_RTN]++;
        OP_JMP:  mech[M_JMP]++;
        OP_JNE:  mech[dut.u_ctrl.take ? M_JNE_T : M_JNE_N]++;
        OP_JBG:  mech[dut.u_ctrl.take ? M_JBG_T : M_JBG_N]++;
        OP_JLE:  mech[dut.u_ctrl.take ? M_JLE_T : M_JLE_N]++;
        OP_JLT:  mech[dut.u_ctrl.take ? M_JLT_T : M_JLT_N]++;
        OP_JEQ:  mech[dut.u_ctrl.take ? M_JEQ_T : M_JEQ_N]++;
        OP_JF1, OP_JF2, OP_JF3, OP_JF4: mech[dut.u_ctrl.take ? M_JF_T : M_JF_N]++;
        OP_SET_F1, OP_SET_F2, OP_SET_F3, OP_SET_F4: mech[M_FSET]++;
        OP_RST_F1, OP_RST_F2, OP_RST_F3, OP_RST_F4: mech[M_FRST]++;
        default: ;
      endcase
    end
    if (ready) mech[M_HLT]++;
    if (dut.bg && !bg_q) mech[M_BG]++;
    bg_q = dut.bg;
    if (ovf && !ovf_q) mech[(run_mode == 2) ? M_OVF_ADD : M_OVF_DIV]++;
    ovf_q = ovf;
  end

  // ------------------------------------------------------- subroutine timing
  int sub_start = -1, sub_cycles = -1;
  logic [8:0] ret_addr = '0;
  always @(negedge clk) if (!reset) begin
    if (dut.u_ctrl.pc == 9'h1F0 && sub_start < 0) begin
      sub_start = cycle;
      ret_addr  = dut.u_ctrl.st;
    end
    if (sub_start >= 0 && sub_cycles < 0 && dut.u_ctrl.pc == ret_addr)
      sub_cycles = cycle - sub_start;
  end

  // --------------------------------------------------------------- watchdog
  initial begin
    #400000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ----------------------------------------------------------------- runs
  task automatic do_run(input int mode, input logic [15:0] divisor_sel);
    logic signed [15:0] a [N], b [N], cc [4];
    logic signed [31:0] dsum, csum;
    logic [15:0] x, y0, q, shd, v, z2, zsh;
    logic        oe;
    int          start;

    run_mode = mode;
    reset = 1'b1;
    pins_idle();
    tick(); tick();

    // samples: a_i in page 0 counting up, b_i in page 1 counting down
    dsum = 0;
    for (int i = 0; i < N; i++) begin
      a[i] = 16'($urandom_range(2000, 1000));
      b[i] = 16'($urandom_range(2000, 1000));
      dsum += 32'(a[i]) * 32'(b[i]);
    end
    host_load_a1(7'd1);
    for (int i = 0; i < N; i++) begin host_write(1'b0, a[i], 1'b1, 1'b0); mech[M_HOST_UP]++; end
    host_load_a1(7'(N));
    for (int i = N - 1; i >= 0; i--) begin host_write(1'b1, b[i], 1'b1, 1'b1); mech[M_HOST_DN]++; end

    x = (divisor_sel != 0) ? divisor_sel
                           : 16'(2 * (dsum / 16384) + 2 + $urandom_range(3000));
    y0 = 16'h1234;
    for (int i = 0; i < 4; i++) cc[i] = 16'($signed(16'($urandom_range(2000))) - 16'sd1000);
    csum = 32'(cc[0]) * 32'(cc[1]) + 32'(cc[2]) * 32'(cc[3]);

    host_write_at(1'b0, 7'h70, 16'(N + 2));
    host_write_at(1'b0, 7'h71, x);
    host_write_at(1'b0, 7'h72, 16'(mode == 2 ? 1 : 0));
    host_write_at(1'b0, 7'h73, 16'h0000);
    host_write_at(1'b0, 7'h74, 16'h0001);
    host_write_at(1'b0, 7'h76, 16'h7000);
    host_write_at(1'b0, 7'h78, y0);
    host_write_at(1'b0, 7'h7A, 16'hF000);
    for (int i = 0; i < 4; i++) host_write_at(1'b0, 7'h20 + 7'(i), cc[i]);
    host_write_at(1'b1, 7'h00, 16'd15);
    host_preset_a1();
    mech[M_HOST_SET]++;
    host_write(1'b0, 16'h0055, 1'b0, 1'b0);
    host_write(1'b1, 16'h0001, 1'b0, 1'b0);
    for (int i = 0; i < N; i++) begin
      host_read_at(1'b1, 7'(i + 1), v, oe);
      mech[M_HOST_RD]++;
      check(v == b[i] && oe, $sformatf("host read back m1[%0d]", i + 1));
    end
    mech[M_HOST_WR]++;

    // run
    sub_start = -1; sub_cycles = -1;
    check(!ready && !ovf, "READY and OVF low in reset");
    @(posedge clk); #1;
    reset = 1'b0;
    check(!data_oe, "data pins released while running");
    start = cycle;
    while (!ready && cycle - start < 3000) @(posedge clk);
    #1;
    $display("run %0d: halted after %0d cycles at pc=%h ovf=%b", mode, cycle - start,
             dut.u_ctrl.pc, ovf);
    check(ready, $sformatf("run %0d reached HLT", mode));
    check(dut.u_ctrl.pc != PC_BAD && (mode == 2 || dut.u_ctrl.pc == PC_DONE),
          $sformatf("run %0d stopped at the expected HLT", mode));
    repeat (3) @(posedge clk);
    #1;
    check(ready, "READY stays high at HLT");
    reset = 1'b1;
    tick();

    if (mode == 2) begin
      check(ovf_q, "ADD overflow sets OVF");
      return;
    end
    check(dut.u_ctrl.pc == '0, "PC cleared by reset");
    check(sub_cycles == 100, $sformatf("division subroutine took %0d cycles, expected 100",
                                        sub_cycles));
    if (mode == 1) begin
      check(ovf_q, "division overflow sets OVF");
      return;
    end
    check(!ovf_q, "no overflow in the normal run");

    q   = 16'((2 * dsum) / 32'(x)) | 16'h1;
    shd = {q[14:0], q[1]};
    host_read_at(1'b0, 7'h60, v, oe); check(v == dsum[15:0],  $sformatf("dot product low %h exp %h", v, dsum[15:0]));
    host_read_at(1'b0, 7'h61, v, oe); check(v == dsum[31:16], $sformatf("dot product high %h exp %h", v, dsum[31:16]));
    host_read_at(1'b0, 7'h62, v, oe); check(v == q,   $sformatf("quotient %h exp %h (D=%h X=%h)", v, q, dsum, x));
    host_read_at(1'b0, 7'h66, v, oe); check(v == shd, $sformatf("SHD result %h exp %h", v, shd));
    host_read_at(1'b0, 7'h63, v, oe); check(v == 16'(y0 + x), $sformatf("ADD %h", v));
    host_read_at(1'b0, 7'h64, v, oe); check(v == 16'(y0 - x), $sformatf("SUB %h", v));
    host_read_at(1'b0, 7'h56, v, oe); check(v == 16'h0001, "MV1 M,TEMP at A1 <- A2");
    host_read_at(1'b1, 7'h57, v, oe); check(v == 16'h0001, "MV2 M,TEMP");
    host_read_at(1'b1, 7'h58, v, oe); check(v == 16'(y0 - x), "MV2 M,Z");
    host_read_at(1'b1, 7'h59, v, oe); check(v == shd, "MV2 M,W");
    z2  = 16'(2 * 16'(y0 - x));
    zsh = {z2[14:0], shd[15]};
    host_read_at(1'b0, 7'h50, v, oe); check(v == z2,  $sformatf("ADD of Y,X loaded from Z: %h exp %h", v, z2));
    host_read_at(1'b0, 7'h51, v, oe); check(v == zsh, $sformatf("SHL result %h exp %h", v, zsh));
    host_read_at(1'b0, 7'h52, v, oe); check(v == csum[15:0],  $sformatf("MAC sum low %h exp %h", v, csum[15:0]));
    host_read_at(1'b0, 7'h53, v, oe); check(v == csum[31:16], $sformatf("MAC sum high %h exp %h", v, csum[31:16]));
  endtask

  initial begin
    pins_idle();
    reset = 1'b1;
    do_run(0, 16'h0000);
    do_run(1, 16'h0003);
    do_run(2, 16'h0000);

    for (int m = 0; m < M_COUNT; m++) begin
      mech_e e;
      e = mech_e'(m);
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", e.name());
      end
    end
    $display("mechanisms:");
    for (int m = 0; m < M_COUNT; m++) begin
      mech_e e;
      e = mech_e'(m);
      $display("  %-10s %0d", e.name(), mech[m]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
