// tb_div_ovf_detect: checks the division overflow detector against its truth table.
//
// The 12 specified rows of the table (ZF, DSR, X(msb), Q(msb) -> DIV_OVF) are
// written out below; the four don't-care rows are not checked.
module tb_div_ovf_detect;
  logic zf, dsr, x_msb, q_msb, div_ovf;
  int checks = 0, failures = 0;

  div_ovf_detect dut (.*);

  // {zf, dsr, xm, qm, expected}; expected 2 = don't care
  int table_rows [16][5] = '{
    '{0,0,0,0,0}, '{0,0,0,1,1}, '{0,0,1,0,1}, '{0,0,1,1,0},
    '{0,1,0,0,1}, '{0,1,0,1,0}, '{0,1,1,0,0}, '{0,1,1,1,1},
    '{1,0,0,0,2}, '{1,0,0,1,1}, '{1,0,1,0,1}, '{1,0,1,1,2},
    '{1,1,0,0,2}, '{1,1,0,1,0}, '{1,1,1,0,1}, '{1,1,1,1,2}};

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 16; r++) begin
      zf = 1'(table_rows[r][0]); dsr = 1'(table_rows[r][1]);
      x_msb = 1'(table_rows[r][2]); q_msb = 1'(table_rows[r][3]);
      #1;
      if (table_rows[r][4] != 2) begin
        checks++;
        if (int'(div_ovf) != table_rows[r][4]) begin
          failures++;
          $display("FAIL row %0d: div_ovf=%b expected %0d", r, div_ovf, table_rows[r][4]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
