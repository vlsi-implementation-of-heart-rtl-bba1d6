// mesa_tb_host.svh: host-side pin tasks shared by the processor testbenches.
//
// Included inside a testbench module that declares the processor's pin signals
// (clk, reset, aen, l_c, set_n, u_d_n, p1_0, ms, r_w, ad_in, d_in, data_out,
// data_oe). Inputs change 1 ns after a rising edge and act on the next rising
// edge. The tasks follow the pin protocol: while RESET=1 the host loads or counts
// the address register A1 and reads or writes the data RAM.

task automatic pins_idle();
  aen = 1'b0; l_c = 1'b0; set_n = 1'b1; u_d_n = 1'b0; p1_0 = 1'b0;
  ms = 1'b0; r_w = 1'b0; ad_in = '0; d_in = '0;
endtask

task automatic tick();
  @(posedge clk);
  #1;
endtask

// load A1 from the AD pins
task automatic host_load_a1(input logic [6:0] a);
  pins_idle();
  aen = 1'b1; l_c = 1'b1; set_n = 1'b1; ad_in = a;
  tick();
  pins_idle();
endtask

// preset A1 to 1111111 (SET low)
task automatic host_preset_a1();
  pins_idle();
  aen = 1'b1; l_c = 1'b1; set_n = 1'b0;
  tick();
  pins_idle();
endtask

// write one word at A1; optionally count A1 up or down in the same cycle
task automatic host_write(input logic page, input logic [15:0] v,
                          input logic count, input logic down);
  pins_idle();
  ms = 1'b1; r_w = 1'b1; p1_0 = page; {d_in, ad_in} = v;
  aen = count; l_c = 1'b0; u_d_n = down;
  tick();
  pins_idle();
endtask

task automatic host_write_at(input logic page, input logic [6:0] a, input logic [15:0] v);
  host_load_a1(a);
  host_write(page, v, 1'b0, 1'b0);
endtask

// read one word: the output latch is driven on the data pins after the edge
task automatic host_read_at(input logic page, input logic [6:0] a, output logic [15:0] v,
                            output logic oe);
  host_load_a1(a);
  ms = 1'b1; r_w = 1'b0; p1_0 = page;
  tick();
  v  = data_out;
  oe = data_oe;
  pins_idle();
endtask
