// tb_program_rom: checks the program ROM image and its falling-edge read.
//
// Compares a set of words with the program listing (the first words of the
// mean-value stage, the call to the division subroutine and the subroutine at
// 1F0h-1FFh), checks that the unused area 154h-1EFh reads zero, and that the
// output changes only on the falling clock edge.
module tb_program_rom;
  logic clk = 0;
  logic [8:0] addr, data;
  int checks = 0, failures = 0;

  program_rom dut (.clk, .addr, .data);
  always #5 clk = ~clk;

  task automatic expect_word(input logic [8:0] a, input logic [8:0] v);
    addr = a;
    @(negedge clk); #1;
    checks++;
    if (data !== v) begin
      failures++;
      $display("FAIL rom[%h] = %h expected %h", a, data, v);
    end
  endtask

  logic [8:0] divsub [16] = '{9'h004, 9'h005, 9'h006, 9'h00A, 9'h011, 9'h012, 9'h013, 9'h02E,
                              9'h011, 9'h012, 9'h014, 9'h011, 9'h005, 9'h002, 9'h1F9, 9'h003};
  logic [8:0] head [8] = '{9'h000, 9'h004, 9'h006, 9'h007, 9'h01E, 9'h01E, 9'h03C, 9'h004};

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++)  expect_word(9'(i), head[i]);
    expect_word(9'h01D, 9'h001);          // BNCH
    expect_word(9'h01E, 9'h1F0);          // its target
    for (int i = 0; i < 16; i++) expect_word(9'h1F0 + 9'(i), divsub[i]);
    for (int i = 9'h154; i < 9'h1F0; i++) expect_word(9'(i), 9'h000);
    // output must not follow the address before the falling edge
    addr = 9'h1F0;
    @(negedge clk); #1;
    addr = 9'h1FE;
    @(posedge clk); #1;
    checks++;
    if (data !== 9'h004) begin failures++; $display("FAIL read not on falling edge"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
