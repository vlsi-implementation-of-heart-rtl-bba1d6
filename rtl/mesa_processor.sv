// mesa_processor: 16-bit maximum-entropy spectral-estimation processor (top level).
//
// What it does: a small Harvard-architecture DSP that runs the Burg algorithm on
// up to 120 16-bit samples held in its own data RAM and leaves the predictor
// (all-pole filter) coefficients in that RAM; the spectrum is then the inverse of
// the filter's frequency response, computed off-chip.
//
// How it works: control_unit fetches 9-bit words from program_rom and latches a
// control word each falling clock edge; processing_unit executes it on the rising
// edge (multiply-accumulate, add/subtract, non-restoring division steps, register
// moves). data_ram is the 256 x 16 data memory (two pages of 128 words, addressed
// by the page bit of the instruction and the 7-bit register A1); its output latch
// is the processor's memory latch ML.
//
// Pins: while RESET=1 the processor is held and the user owns the RAM and A1:
// AEN enables A1, L/C=1 loads it from AD6-AD0 (or presets it to 1111111 when
// SET=0), L/C=0 counts it (U/D: 0 up, 1 down); MS=1 selects the RAM, R/W=1 writes
// {D15-D7, AD6-AD0}, R/W=0 reads into the output latch, which is driven on the
// data pins (data_oe=1). With RESET=0 the program runs from address 0, the data
// pins are released and the user inputs are ignored. READY goes high when the
// program reaches HLT; OVF goes high on an arithmetic or division overflow and
// stays high until reset.
//
// The bidirectional pins AD6-AD0 and D15-D7 are split into ad_in/d_in (driven by
// the host), data_out and data_oe (driven by the chip); the three-state pad
// buffers and the supply pins are outside the RTL.
//
// Parameter ROM_FILE selects the program image (default: the analysis program).
module mesa_processor #(
  parameter string ROM_FILE = "rtl/mesa_program.hex"
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        aen,
  input  logic        l_c,
  input  logic        set_n,
  input  logic        u_d_n,
  input  logic        p1_0,
  input  logic        ms,
  input  logic        r_w,
  input  logic [6:0]  ad_in,
  input  logic [8:0]  d_in,
  output logic [15:0] data_out,
  output logic        data_oe,
  output logic        ready,
  output logic        ovf
);
  import mesa_pkg::*;

  cur_t        cur;
  logic [6:0]  car, a1;
  logic [8:0]  rom_addr, rom_data, pc;
  logic [15:0] co1, co2, ml, acc_hi, acc_lo;
  logic        bg, add_ovf, div_ovf;

  logic        pu_a1_en, pu_a1_load, pu_a1_set_n, pu_a1_down;
  logic [6:0]  pu_a1_d;
  logic        pu_cs, pu_we, pu_page;
  logic [15:0] pu_wdata;

  program_rom #(.INIT_FILE(ROM_FILE)) u_rom (.clk, .addr(rom_addr), .data(rom_data));

  control_unit u_ctrl (
    .clk, .reset,
    .rom_data, .rom_addr,
    .a1, .co1, .co2, .bg, .add_ovf, .div_ovf,
    .cur, .car, .pc, .ready, .ovf
  );

  processing_unit u_pu (
    .clk, .rst(reset),
    .cur, .car, .ml,
    .a1_en(pu_a1_en), .a1_load(pu_a1_load), .a1_set_n(pu_a1_set_n),
    .a1_down(pu_a1_down), .a1_d(pu_a1_d),
    .mem_cs(pu_cs), .mem_we(pu_we), .mem_page(pu_page), .mem_wdata(pu_wdata),
    .co1, .co2, .bg, .add_ovf, .div_ovf,
    .acc({acc_hi, acc_lo})
  );

  // ------------------------------------------ user / processor selection
  logic        a1_en, a1_load, a1_set_n, a1_down;
  logic [6:0]  a1_d;
  logic        ram_cs, ram_we;
  logic [7:0]  ram_addr;
  logic [15:0] ram_wdata;

  always_comb begin
    if (reset) begin
      a1_en     = aen;
      a1_load   = l_c;
      a1_set_n  = set_n;
      a1_down   = u_d_n;
      a1_d      = ad_in;
      ram_cs    = ms;
      ram_we    = r_w;
      ram_addr  = {p1_0, a1};
      ram_wdata = {d_in, ad_in};
    end else begin
      a1_en     = pu_a1_en;
      a1_load   = pu_a1_load;
      a1_set_n  = pu_a1_set_n;
      a1_down   = pu_a1_down;
      a1_d      = pu_a1_d;
      ram_cs    = pu_cs;
      ram_we    = pu_we;
      ram_addr  = {pu_page, a1};
      ram_wdata = pu_wdata;
    end
  end

  addr_counter #(.W(7)) u_a1 (
    .clk, .en(a1_en), .load(a1_load), .set_n(a1_set_n), .down(a1_down), .d(a1_d), .q(a1)
  );

  // The output latch is not cleared by RESET: the user reads results through it
  // while the processor is held in reset.
  data_ram #(.WORDS(256), .W(16)) u_ram (
    .clk, .rst(1'b0), .cs(ram_cs), .we(ram_we), .addr(ram_addr), .wdata(ram_wdata), .q(ml)
  );

  assign data_out = ml;
  assign data_oe  = reset && ms && !r_w;

  logic unused_obs;
  assign unused_obs = ^{pc, acc_hi, acc_lo};
endmodule
