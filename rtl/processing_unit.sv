// processing_unit: data processing section of the MESA processor.
//
// What it does: executes the control word (mesa_pkg::cur_t) latched by the control
// unit, one word per rising clock edge. It holds the 16-bit registers X, Y, TEMP,
// CO1, CO2, the 32-bit accumulator Z:W, the 7-bit register A2, the multiplier
// registers MU1/MU2/MU3 (mac_unit), the dividend-sign register DSR and the flags
// BG, ADD_OVF and DIV_OVF. The RAM and the address register A1 sit outside (in the
// top level, because the pins also reach them while the processor is in reset);
// this unit drives their control lines.
//
// How it works:
//  * One internal bus carries Z, W, TEMP or the RAM output latch ML to a
//    destination register, to MU1 or to the RAM write port.
//  * The accumulator keeps the one's complement of its value and drives the bus
//    through inverters, so bus value = ~stored. Clearing it stores zeros, i.e. the
//    value -1; programs cancel that -1 with the product 1*1 they leave in MU3.
//    A left shift (SHL) shifts the stored word with a 0 in, so the value becomes
//    2*v+1: this supplies the final "set the LSB" step of non-restoring division.
//  * One 32-bit carry-look-ahead adder (cla_adder32) is shared. Multiply-
//    accumulate adds the value of Z:W and the two carry-save rows of MU3 (one row
//    of full adders, then the adder). ADD, SUB and the division steps use it in
//    split mode as a 16-bit adder on Y and X, and write Z.
//  * Division (DIV1, DIV2) is one non-restoring step per instruction: Z <- Y +- X
//    with the operation from div_control, and the quotient bit into W(0). The
//    first step also records the zero flag and the first quotient bit for
//    div_ovf_detect.
//  * All transfers of one word use the register values from before the edge,
//    including A1, whose count happens at the same edge as the RAM access.
//
// Interface: rising-edge clk, synchronous active-high rst (clears every register
// except A2 and the RAM). The flag outputs are registered and valid from the edge
// after the instruction that sets them, in time for the control unit's next
// falling-edge decision.
//
// Follows the processor: register set, instruction effects, complemented
// accumulator, shared adder with its split at bit 16, division rule and overflow
// detection. Own choices: the control word layout; BG means the accumulated value
// no longer fits a signed 16-bit word and is updated by every accumulation; ADD_OVF
// is the signed 16-bit overflow of ADD and SUB; DSR is loaded from the sign of Z by
// MV Y,Z; the quotient bit is taken from the result sign (see div_control).
module processing_unit
  import mesa_pkg::*;
#(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst,
  input  cur_t         cur,
  input  logic [6:0]   car,        // immediate address from the control unit
  input  logic [W-1:0] ml,         // RAM output latch
  // A1 control
  output logic         a1_en,
  output logic         a1_load,
  output logic         a1_set_n,
  output logic         a1_down,
  output logic [6:0]   a1_d,
  // RAM port
  output logic         mem_cs,
  output logic         mem_we,
  output logic         mem_page,
  output logic [W-1:0] mem_wdata,
  // registers and flags seen by the control unit
  output logic [W-1:0] co1,
  output logic [W-1:0] co2,
  output logic         bg,
  output logic         add_ovf,
  output logic         div_ovf,
  // accumulator value (true value, for observation)
  output logic [2*W-1:0] acc
);
  logic [W-1:0] x, y, temp;
  logic [W-1:0] zs, ws;            // stored (complemented) accumulator
  logic         dsr, q_prev, first_zf, first_q;
  logic [6:0]   a2;
  logic [W-1:0] bus;

  assign acc = ~{zs, ws};

  // ------------------------------------------------------------------ bus
  always_comb begin
    unique case (cur.src)
      SRC_Z:    bus = ~zs;
      SRC_W:    bus = ~ws;
      SRC_TEMP: bus = temp;
      default:  bus = ml;
    endcase
  end

  // ------------------------------------------------------------------ MAC
  logic [W-1:0]   mu1, mu2;
  logic [2*W-1:0] mu3_sum;
  logic [2*W-2:0] mu3_carry;

  mac_unit #(.W(W)) u_mac (
    .clk, .rst,
    .shift    (cur.mu_shift),
    .mu3_ld   (cur.mu3_ld),
    .din      (bus),
    .mu1, .mu2, .mu3_sum, .mu3_carry
  );

  // --------------------------------------------------------- shared adder
  logic [2*W-1:0] csa_s, csa_c, c_shift;
  logic [2*W-1:0] add_a, add_b, add_s;
  logic           add_sub, add_split, unused_cout, unused_c16;
  logic           div_first, div_sub, div_q;
  logic           is_div;

  always_comb begin
    c_shift = {mu3_carry, 1'b0};
    csa_s   = acc ^ mu3_sum ^ c_shift;
    csa_c   = ((acc & mu3_sum) | (acc & c_shift) | (mu3_sum & c_shift)) << 1;
  end

  assign is_div    = (cur.acc == ACC_DIV1) || (cur.acc == ACC_DIV2);
  assign div_first = (cur.acc == ACC_DIV1);

  div_control u_divc (
    .first  (div_first),
    .dsr    (dsr),
    .x_msb  (x[W-1]),
    .q_prev (q_prev),
    .sum_msb(add_s[2*W-1]),
    .sub    (div_sub),
    .q      (div_q)
  );

  always_comb begin
    add_split = (cur.acc != ACC_MAC);
    add_a     = add_split ? {y, {W{1'b0}}} : csa_s;
    add_b     = add_split ? {x, {W{1'b0}}} : csa_c;
    add_sub   = (cur.acc == ACC_SUB) || (is_div && div_sub);
  end

  cla_adder32 u_add (
    .a(add_a), .b(add_b), .sub(add_sub), .split(add_split),
    .s(add_s), .cout(unused_cout), .c16(unused_c16)
  );

  logic [W-1:0] r16;
  logic         ovf16, fits16;
  always_comb begin
    r16    = add_s[2*W-1 -: W];
    // signed overflow of Y +- X
    ovf16  = add_sub ? (y[W-1] != x[W-1]) && (r16[W-1] != y[W-1])
                     : (y[W-1] == x[W-1]) && (r16[W-1] != y[W-1]);
    fits16 = (add_s[2*W-1:W-1] == '0) || (add_s[2*W-1:W-1] == '1);
  end

  div_ovf_detect u_dovf (.zf(first_zf), .dsr(dsr), .x_msb(x[W-1]), .q_msb(first_q),
                         .div_ovf(div_ovf));

  // ------------------------------------------------------- A1 and the RAM
  always_comb begin
    a1_en    = (cur.a1 != A1_HOLD);
    a1_load  = (cur.a1 == A1_SET) || (cur.a1 == A1_LD_BUS) || (cur.a1 == A1_LD_A2) ||
               (cur.a1 == A1_LD_CAR);
    a1_set_n = (cur.a1 != A1_SET);
    a1_down  = (cur.a1 == A1_DEC);
    unique case (cur.a1)
      A1_LD_A2:  a1_d = a2;
      A1_LD_CAR: a1_d = car;
      default:   a1_d = bus[6:0];
    endcase
    mem_cs    = cur.mem_rd | cur.mem_wr;
    mem_we    = cur.mem_wr;
    mem_page  = cur.page;
    mem_wdata = bus;
  end

  // -------------------------------------------------------------- A2
  addr_counter #(.W(7)) u_a2 (
    .clk,
    .en   (cur.a2 != A2_HOLD),
    .load (cur.a2 == A2_LD_BUS),
    .set_n(1'b1),
    .down (cur.a2 == A2_DEC),
    .d    (bus[6:0]),
    .q    (a2)
  );

  // -------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (rst) begin
      x <= '0; y <= '0; temp <= '0; co1 <= '0; co2 <= '0;
      zs <= '0; ws <= '0;
      dsr <= 1'b0; q_prev <= 1'b0; first_zf <= 1'b0; first_q <= 1'b0;
      bg <= 1'b0; add_ovf <= 1'b0;
    end else begin
      unique case (cur.dst)
        DST_X:    x    <= bus;
        DST_Y:    y    <= bus;
        DST_CO1:  co1  <= bus;
        DST_CO2:  co2  <= bus;
        DST_TEMP: temp <= bus;
        default:  ;
      endcase
      if (cur.dsr_ld) dsr <= bus[W-1];

      add_ovf <= 1'b0;
      unique case (cur.acc)
        ACC_CLR: begin
          zs <= '0;
          ws <= '0;
        end
        ACC_MAC: begin
          {zs, ws} <= ~add_s;
          bg       <= ~fits16;
        end
        ACC_ADD, ACC_SUB: begin
          zs      <= ~r16;
          add_ovf <= ovf16;
        end
        ACC_DIV1, ACC_DIV2: begin
          zs     <= ~r16;
          ws[0]  <= ~div_q;
          q_prev <= div_q;
          if (div_first) begin
            first_zf <= (r16 == '0);
            first_q  <= div_q;
          end
        end
        ACC_SHL: {zs, ws} <= {zs[W-2:0], ws, 1'b0};
        ACC_SHD: {zs, ws} <= {zs[W-2:0], ws, ~q_prev};
        default: ;
      endcase
    end
  end

  logic unused_mu;
  assign unused_mu = ^{mu1, mu2};
endmodule
