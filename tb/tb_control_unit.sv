// tb_control_unit: self-checking test of the control unit with a small program.
//
// A ROM model in the testbench (read on the falling edge like the program ROM)
// holds a program that exercises: a flag set and JF1 taken, BNCH to a subroutine
// and RTN back, JMP, JNE/JLT/JLE/JEQ not taken (with CO2 = -1, so the compares
// must be signed), JBG taken, MVI loading C.A.R., SET OVF with a division overflow
// and HLT. The testbench checks the exact sequence of program-counter values, the
// two-word timing of branches, the control word issued for ADD and MVI, READY and
// the sticky OVF. A watchdog ends the run.
module tb_control_unit;
  import mesa_pkg::*;

  logic        clk = 1'b0, reset;
  logic [8:0]  rom_data, rom_addr, pc;
  logic [6:0]  a1, car;
  logic [15:0] co1, co2;
  logic        bg, add_ovf, div_ovf, ready, ovf;
  cur_t        cur;
  int checks = 0, failures = 0;

  logic [8:0] rom [512];
  always_ff @(negedge clk) rom_data <= rom[rom_addr];

  control_unit dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // expected program-counter trace after reset
  int exp_pc [] = '{'h01, 'h02, 'h03, 'h06, 'h07, 'h10, 'h11, 'h12, 'h08, 'h09, 'h20,
                    'h21, 'h22, 'h23, 'h24, 'h25, 'h26, 'h27, 'h28, 'h29, 'h30, 'h31,
                    'h32, 'h33, 'h34, 'h34, 'h34};

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_add = 0, n_ldcar = 0;
  always @(posedge clk) if (!reset) begin
    if (cur.acc == ACC_ADD) n_add++;
    if (cur.a1 == A1_LD_CAR) begin
      n_ldcar++;
      if (car !== 7'h55) begin failures++; $display("FAIL C.A.R. = %h", car); end
    end
  end

  initial begin
    foreach (rom[i]) rom[i] = OP_HLT;
    rom['h00] = OP_NOP;
    rom['h01] = OP_SET_F1;
    rom['h02] = OP_JF1;   rom['h03] = 9'h006;
    rom['h06] = OP_BNCH;  rom['h07] = 9'h010;
    rom['h10] = OP_ADD;
    rom['h11] = OP_NOP;
    rom['h12] = OP_RTN;
    rom['h08] = OP_JMP;   rom['h09] = 9'h020;
    rom['h20] = OP_JNE;   rom['h21] = 9'h100;   // a1 == co1[6:0]: not taken
    rom['h22] = OP_JLT;   rom['h23] = 9'h100;   // 5 < -1 is false
    rom['h24] = OP_JLE;   rom['h25] = 9'h100;
    rom['h26] = OP_JEQ;   rom['h27] = 9'h100;
    rom['h28] = OP_JBG;   rom['h29] = 9'h030;   // taken
    rom['h30] = OP_MVI_A1; rom['h31] = 9'h055;
    rom['h32] = OP_SET_OVF;
    rom['h33] = OP_RST_F1;
    rom['h34] = OP_HLT;

    a1 = 7'h05; co1 = 16'h0005; co2 = 16'hFFFF; bg = 1'b1; add_ovf = 1'b0; div_ovf = 1'b1;
    reset = 1'b1;
    repeat (3) @(posedge clk);
    #1;
    check(pc == 9'h000 && !ready && !ovf, "reset state");
    reset = 1'b0;
    foreach (exp_pc[i]) begin
      @(negedge clk); #1;
      check(pc == 9'(exp_pc[i]), $sformatf("step %0d: pc=%h expected %h", i, pc, exp_pc[i]));
    end
    check(ready, "READY at HLT");
    check(ovf, "OVF set by SET OVF with a division overflow");
    check(n_add == 1, "ADD issued once");
    check(n_ldcar == 1, "MVI loads A1 once");
    div_ovf = 1'b0;
    repeat (3) @(negedge clk);
    #1;
    check(ovf, "OVF stays set");
    reset = 1'b1;
    @(negedge clk); #1;
    check(!ovf && pc == 9'h000, "reset clears OVF and PC");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
