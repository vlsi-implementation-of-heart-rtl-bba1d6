// control_unit: pipelined hardwired control unit of the MESA processor.
//
// What it does: fetches one 9-bit instruction word per clock, keeps the program
// counter, the one-level subroutine stack, the jump and flag state, decides
// branches, and latches a control word (mesa_pkg::cur_t) for the processing unit.
//
// How it works: all state here changes on the falling clock edge, the processing
// unit on the rising edge. The ROM is addressed with the next program counter
// (pc_next) and its registered output is the instruction register ir, so ir
// always holds the word at pc. During the cycle an instruction sits in ir, its
// control word is decoded and latched into cur at the next falling edge; the
// processing unit executes it half a cycle later. A conditional branch therefore
// tests the registers as left by the instruction just before it.
//
// Two-word instructions (BNCH, JMP, JNE, JBG, JLE, JLT, JEQ, JF1-JF4 and MVI A1)
// set FLAG6 so that their second word is not decoded as an instruction. For a
// branch, JUMP records the decision, and during the second word the program
// counter takes that word as the target (taken) or steps over it. BNCH stores
// pc+2 in the stack register ST; RTN returns to it. MVI sets FLAG5, and its second
// word is copied into the immediate-address register C.A.R. and loaded into A1.
// HLT holds the program counter and raises READY. OVF is set by SET OVF when the
// divider reports overflow, or by an ADD/SUB overflow, and stays set until reset.
//
// Branch conditions: JNE: A1 != CO1[6:0]; JBG: BG; JLE: CO1 <= CO2; JLT: CO1 < CO2;
// JEQ: CO1 = CO2 (signed 16-bit compares); JF1-JF4: flag F1-F4 set. Flags F1-F4 are
// set and cleared by SET/RST F1-F4.
//
// Interface: clk (falling edge used), synchronous active-high reset (pc = 0, all
// flags clear, cur = NOP). rom_addr is combinational from the state; rom_data is
// the ROM's registered output.
//
// Follows the processor: the program-counter, stack, flag, jump, immediate-address,
// FLAG6, HLT and overflow rules of its control routines. Own choices: the control
// word encoding; signed compares for JLE/JLT; C.A.R. is loaded into A1 through the
// control word of the MVI data cycle (the processor loads A1 directly); SHD shifts
// the last quotient bit into W(0).
module control_unit
  import mesa_pkg::*;
#(
  parameter int PC_W = 9
) (
  input  logic            clk,
  input  logic            reset,
  input  logic [8:0]      rom_data,
  output logic [PC_W-1:0] rom_addr,
  input  logic [6:0]      a1,
  input  logic [15:0]     co1,
  input  logic [15:0]     co2,
  input  logic            bg,
  input  logic            add_ovf,
  input  logic            div_ovf,
  output cur_t            cur,
  output logic [6:0]      car,
  output logic [PC_W-1:0] pc,
  output logic            ready,
  output logic            ovf
);
  logic [8:0]      ir;
  logic [PC_W-1:0] st;
  logic            jump, f5, f6;
  logic [4:1]      fl;
  logic [PC_W-1:0] pc_next;
  logic            jump_next, f5_next, f6_next, take;
  cur_t            cur_next;

  assign ir       = rom_data;
  assign rom_addr = pc_next;

  // -------------------------------------------------- program counter
  always_comb begin
    if (reset)                  pc_next = '0;
    else if (jump)              pc_next = ir[PC_W-1:0];
    else if (f6)                pc_next = pc + 1'b1;
    else if (ir == OP_RTN)      pc_next = st;
    else if (ir == OP_HLT)      pc_next = pc;
    else                        pc_next = pc + 1'b1;
  end

  // ---------------------------------------------------- branch decision
  always_comb begin
    unique case (ir)
      OP_BNCH, OP_JMP: take = 1'b1;
      OP_JNE:  take = (a1 != co1[6:0]);
      OP_JBG:  take = bg;
      OP_JLE:  take = ($signed(co1) <= $signed(co2));
      OP_JLT:  take = ($signed(co1) <  $signed(co2));
      OP_JEQ:  take = (co1 == co2);
      OP_JF1:  take = fl[1];
      OP_JF2:  take = fl[2];
      OP_JF3:  take = fl[3];
      OP_JF4:  take = fl[4];
      default: take = 1'b0;
    endcase
    jump_next = !f6 && take;
    f5_next   = !f6 && (ir == OP_MVI_A1);
    f6_next   = !f6 && (ir inside {OP_BNCH, OP_JNE, OP_JBG, OP_JLE, OP_JLT, OP_JMP,
                                   OP_JEQ, OP_MVI_A1, OP_JF1, OP_JF2, OP_JF3, OP_JF4});
  end

  // ------------------------------------------------------------ decoder
  always_comb begin
    cur_next = CUR_NOP;
    if (f5) begin
      cur_next.a1 = A1_LD_CAR;
    end else if (!f6) begin
      unique case (ir)
        // register moves
        OP_MV_Y_Z:   begin cur_next.src = SRC_Z; cur_next.dst = DST_Y; cur_next.dsr_ld = 1'b1; end
        OP_MV_X_Z:   begin cur_next.src = SRC_Z; cur_next.dst = DST_X;   end
        OP_MV_CO1_Z: begin cur_next.src = SRC_Z; cur_next.dst = DST_CO1; end
        OP_MV_CO2_Z: begin cur_next.src = SRC_Z; cur_next.dst = DST_CO2; end
        OP_MV_A1_Z:  begin cur_next.src = SRC_Z; cur_next.a1  = A1_LD_BUS; end
        OP_MV_A2_Z:  begin cur_next.src = SRC_Z; cur_next.a2  = A2_LD_BUS; end
        OP_MV_X_W:   begin cur_next.src = SRC_W; cur_next.dst = DST_X;   end
        OP_MV_A1_A2: cur_next.a1 = A1_LD_A2;
        // multiplier moves
        OP_MV_MU1_Z: begin
          cur_next.src = SRC_Z; cur_next.mu_shift = 1'b1; cur_next.mu3_ld = 1'b1;
          cur_next.acc = ACC_CLR;
        end
        OP_MV1_MU1_TEMP: begin
          cur_next.src = SRC_TEMP; cur_next.mu_shift = 1'b1; cur_next.mu3_ld = 1'b1;
          cur_next.acc = ACC_MAC;
        end
        OP_MV2_MU1_TEMP: begin cur_next.src = SRC_TEMP; cur_next.mu_shift = 1'b1; end
        OP_MV_MU1_W: begin
          cur_next.src = SRC_W; cur_next.mu_shift = 1'b1; cur_next.mu3_ld = 1'b1;
          cur_next.acc = ACC_CLR;
        end
        // memory writes
        OP_MV1_M_Z:    begin cur_next.src = SRC_Z;    cur_next.mem_wr = 1'b1; cur_next.a1 = A1_INC; end
        OP_MV2_M_Z:    begin cur_next.src = SRC_Z;    cur_next.mem_wr = 1'b1; cur_next.page = 1'b1; cur_next.a1 = A1_INC; end
        OP_MV1_M_TEMP: begin cur_next.src = SRC_TEMP; cur_next.mem_wr = 1'b1; cur_next.a1 = A1_INC; end
        OP_MV2_M_TEMP: begin cur_next.src = SRC_TEMP; cur_next.mem_wr = 1'b1; cur_next.page = 1'b1; cur_next.a1 = A1_INC; end
        OP_MV1_M_W:    begin cur_next.src = SRC_W;    cur_next.mem_wr = 1'b1; end
        OP_MV2_M_W:    begin cur_next.src = SRC_W;    cur_next.mem_wr = 1'b1; cur_next.page = 1'b1; end
        // memory reads: the destination takes the old latch, the latch the new word
        OP_MV_TEMP_ML: begin cur_next.src = SRC_ML; cur_next.dst = DST_TEMP; cur_next.mem_rd = 1'b1; cur_next.page = 1'b1; end
        OP_MV_CO1_ML:  begin cur_next.src = SRC_ML; cur_next.dst = DST_CO1;  cur_next.mem_rd = 1'b1; end
        OP_MV_CO2_ML:  begin cur_next.src = SRC_ML; cur_next.dst = DST_CO2;  cur_next.mem_rd = 1'b1; end
        OP_MV_A2_ML:   begin cur_next.src = SRC_ML; cur_next.a2 = A2_LD_BUS; cur_next.mem_rd = 1'b1; cur_next.page = 1'b1; end
        OP_MV_X_ML:    begin cur_next.src = SRC_ML; cur_next.dst = DST_X;    cur_next.mem_rd = 1'b1; end
        OP_MV_Y_ML:    begin cur_next.src = SRC_ML; cur_next.dst = DST_Y;    cur_next.mem_rd = 1'b1; cur_next.a1 = A1_DEC; end
        OP_MV1_MU1_ML, OP_MV2_MU1_ML, OP_MV3_MU1_ML, OP_MV4_MU1_ML: begin
          cur_next.src = SRC_ML; cur_next.mem_rd = 1'b1; cur_next.a1 = A1_INC;
          cur_next.mu_shift = 1'b1; cur_next.mu3_ld = 1'b1;
          cur_next.page = (ir == OP_MV2_MU1_ML) || (ir == OP_MV3_MU1_ML);
          cur_next.acc  = (ir == OP_MV1_MU1_ML) || (ir == OP_MV2_MU1_ML) ? ACC_CLR : ACC_MAC;
        end
        OP_MV5_MU1_ML: begin cur_next.src = SRC_ML; cur_next.mem_rd = 1'b1; cur_next.mu_shift = 1'b1; end
        OP_MV6_MU1_ML: begin cur_next.src = SRC_ML; cur_next.mem_rd = 1'b1; cur_next.mu_shift = 1'b1; cur_next.page = 1'b1; end
        OP_MV7_MU1_ML: begin cur_next.src = SRC_ML; cur_next.mem_rd = 1'b1; cur_next.mu_shift = 1'b1; cur_next.a1 = A1_INC; end
        OP_MV1_ML_M:   begin cur_next.mem_rd = 1'b1; cur_next.a1 = A1_INC; end
        OP_MV2_ML_M:   cur_next.mem_rd = 1'b1;
        OP_MV3_ML_M:   begin cur_next.mem_rd = 1'b1; cur_next.page = 1'b1; end
        // arithmetic
        OP_ADD:    cur_next.acc = ACC_ADD;
        OP_SUB:    cur_next.acc = ACC_SUB;
        OP_DIV1:   cur_next.acc = ACC_DIV1;
        OP_DIV2:   cur_next.acc = ACC_DIV2;
        OP_INR_A2: cur_next.a2  = A2_INC;
        OP_DCR_A2: cur_next.a2  = A2_DEC;
        OP_INR_A1: cur_next.a1  = A1_INC;
        OP_DCR_A1: cur_next.a1  = A1_DEC;
        OP_SET_A1: cur_next.a1  = A1_SET;
        OP_SHL:    cur_next.acc = ACC_SHL;
        OP_SHD:    cur_next.acc = ACC_SHD;
        OP_NOP:    ;
        default:   ;  // branches, flag and machine-control words
      endcase
    end
  end

  assign ready = !f6 && (ir == OP_HLT);

  // ------------------------------------------------------ state update
  always_ff @(negedge clk) begin
    if (reset) begin
      pc   <= '0;
      st   <= '0;
      jump <= 1'b0;
      f5   <= 1'b0;
      f6   <= 1'b0;
      fl   <= '0;
      car  <= '0;
      cur  <= CUR_NOP;
      ovf  <= 1'b0;
    end else begin
      pc   <= pc_next;
      jump <= jump_next;
      f5   <= f5_next;
      f6   <= f6_next;
      cur  <= cur_next;
      if (f5) car <= ir[6:0];
      if (!f6) begin
        if (ir == OP_BNCH) st <= pc + PC_W'(2);
        unique case (ir)
          OP_SET_F1: fl[1] <= 1'b1;
          OP_RST_F1: fl[1] <= 1'b0;
          OP_SET_F2: fl[2] <= 1'b1;
          OP_RST_F2: fl[2] <= 1'b0;
          OP_SET_F3: fl[3] <= 1'b1;
          OP_RST_F3: fl[3] <= 1'b0;
          OP_SET_F4: fl[4] <= 1'b1;
          OP_RST_F4: fl[4] <= 1'b0;
          default: ;
        endcase
        if ((ir == OP_SET_OVF && div_ovf) || add_ovf) ovf <= 1'b1;
      end
    end
  end
endmodule
