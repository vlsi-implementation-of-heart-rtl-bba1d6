// mesa_pkg: shared types and constants of the MESA spectral-estimation processor.
//
// What it holds: the 9-bit opcodes of the instruction set and the control word
// (cur_t) that the control unit latches into its control register every cycle and
// the processing unit executes on the following rising clock edge.
//
// The opcode values are those of the processor's instruction tables. The layout of
// the control word is this design's own: the original control register is a set of
// decoded control lines whose bit assignment is not given, so the word is expressed
// here as enumerated fields, one per resource of the processing unit.
package mesa_pkg;

  // ---------------------------------------------------------------- opcodes
  localparam logic [8:0] OP_NOP      = 9'h000;
  localparam logic [8:0] OP_BNCH     = 9'h001;
  localparam logic [8:0] OP_JNE      = 9'h002;
  localparam logic [8:0] OP_RTN      = 9'h003;
  localparam logic [8:0] OP_SET_A1   = 9'h004;
  localparam logic [8:0] OP_INR_A1   = 9'h005;
  localparam logic [8:0] OP_MV3_ML_M = 9'h006;
  localparam logic [8:0] OP_MV_TEMP_ML = 9'h007;
  localparam logic [8:0] OP_MV3_MU1_ML = 9'h008;
  localparam logic [8:0] OP_MV1_ML_M = 9'h009;
  localparam logic [8:0] OP_MV_CO1_ML = 9'h00A;
  localparam logic [8:0] OP_MV_CO1_Z = 9'h00B;
  localparam logic [8:0] OP_MV1_MU1_ML = 9'h00C;
  localparam logic [8:0] OP_MV2_MU1_TEMP = 9'h00D;
  localparam logic [8:0] OP_MV4_MU1_ML = 9'h00E;
  localparam logic [8:0] OP_MV1_MU1_TEMP = 9'h00F;
  localparam logic [8:0] OP_MV_X_ML  = 9'h010;
  localparam logic [8:0] OP_SHL      = 9'h011;
  localparam logic [8:0] OP_MV_Y_Z   = 9'h012;
  localparam logic [8:0] OP_DIV1     = 9'h013;
  localparam logic [8:0] OP_DIV2     = 9'h014;
  localparam logic [8:0] OP_MV_X_W   = 9'h015;
  localparam logic [8:0] OP_MV_Y_ML  = 9'h016;
  localparam logic [8:0] OP_SUB      = 9'h017;
  localparam logic [8:0] OP_MV1_M_Z  = 9'h018;
  localparam logic [8:0] OP_MV2_M_Z  = 9'h019;
  localparam logic [8:0] OP_MV2_ML_M = 9'h01A;
  localparam logic [8:0] OP_MV5_MU1_ML = 9'h01B;
  localparam logic [8:0] OP_MV1_M_TEMP = 9'h01C;
  localparam logic [8:0] OP_MV2_M_W  = 9'h01D;
  localparam logic [8:0] OP_MV6_MU1_ML = 9'h01E;
  localparam logic [8:0] OP_MV2_MU1_ML = 9'h01F;
  localparam logic [8:0] OP_MV_MU1_W = 9'h020;
  localparam logic [8:0] OP_DCR_A1   = 9'h021;
  localparam logic [8:0] OP_MV_X_Z   = 9'h022;
  localparam logic [8:0] OP_MV_MU1_Z = 9'h023;
  localparam logic [8:0] OP_MV_A2_ML = 9'h024;
  localparam logic [8:0] OP_MV_A1_A2 = 9'h025;
  localparam logic [8:0] OP_ADD      = 9'h026;
  localparam logic [8:0] OP_MV2_M_TEMP = 9'h027;
  localparam logic [8:0] OP_DCR_A2   = 9'h028;
  localparam logic [8:0] OP_INR_A2   = 9'h029;
  localparam logic [8:0] OP_MV_A2_Z  = 9'h02A;
  localparam logic [8:0] OP_MV_A1_Z  = 9'h02B;
  localparam logic [8:0] OP_MV7_MU1_ML = 9'h02C;
  localparam logic [8:0] OP_MV1_M_W  = 9'h02D;
  localparam logic [8:0] OP_SET_OVF  = 9'h02E;
  localparam logic [8:0] OP_JBG      = 9'h02F;
  localparam logic [8:0] OP_SET_F1   = 9'h030;
  localparam logic [8:0] OP_RST_F1   = 9'h031;
  localparam logic [8:0] OP_MV_CO2_ML = 9'h032;
  localparam logic [8:0] OP_MV_CO2_Z = 9'h033;
  localparam logic [8:0] OP_JLE      = 9'h034;
  localparam logic [8:0] OP_JLT      = 9'h035;
  localparam logic [8:0] OP_JMP      = 9'h036;
  localparam logic [8:0] OP_JEQ      = 9'h037;
  localparam logic [8:0] OP_SET_F2   = 9'h038;
  localparam logic [8:0] OP_RST_F2   = 9'h039;
  localparam logic [8:0] OP_SET_F3   = 9'h03A;
  localparam logic [8:0] OP_RST_F3   = 9'h03B;
  localparam logic [8:0] OP_SET_F4   = 9'h03C;
  localparam logic [8:0] OP_RST_F4   = 9'h03D;
  localparam logic [8:0] OP_MVI_A1   = 9'h03E;
  localparam logic [8:0] OP_HLT      = 9'h03F;
  localparam logic [8:0] OP_JF1      = 9'h040;
  localparam logic [8:0] OP_JF2      = 9'h041;
  localparam logic [8:0] OP_JF3      = 9'h042;
  localparam logic [8:0] OP_JF4      = 9'h043;
  localparam logic [8:0] OP_SHD      = 9'h044;

  // ---------------------------------------------------------- control word
  // Source put on the internal bus.
  typedef enum logic [1:0] {SRC_Z, SRC_W, SRC_TEMP, SRC_ML} src_e;

  // Register loaded from the bus (or, for A1, from another source).
  typedef enum logic [3:0] {
    DST_NONE, DST_X, DST_Y, DST_CO1, DST_CO2, DST_TEMP, DST_A2, DST_A1
  } dst_e;

  // Accumulator (Z:W) operation.
  typedef enum logic [3:0] {
    ACC_HOLD,   // keep
    ACC_CLR,    // clear (store all zeros)
    ACC_MAC,    // ZW <- ZW + MU3
    ACC_ADD,    // Z  <- Y + X
    ACC_SUB,    // Z  <- Y - X
    ACC_DIV1,   // first non-restoring step
    ACC_DIV2,   // following non-restoring steps
    ACC_SHL,    // shift Z:W left one place
    ACC_SHD     // shift Z:W left, last quotient bit into W(0)
  } acc_e;

  // A1 address register operation.
  typedef enum logic [2:0] {
    A1_HOLD, A1_INC, A1_DEC, A1_SET, A1_LD_BUS, A1_LD_A2, A1_LD_CAR
  } a1_e;

  // A2 register operation.
  typedef enum logic [1:0] {A2_HOLD, A2_INC, A2_DEC, A2_LD_BUS} a2_e;

  typedef struct packed {
    src_e  src;      // bus source
    dst_e  dst;      // bus destination
    logic  mu_shift; // MU1 <- bus, MU2 <- MU1
    logic  mu3_ld;   // MU3 <- MU1 * MU2
    acc_e  acc;      // accumulator operation
    logic  mem_rd;   // ML <- RAM[page, A1]
    logic  mem_wr;   // RAM[page, A1] <- bus
    logic  page;     // RAM page
    a1_e   a1;       // A1 operation
    a2_e   a2;       // A2 operation
    logic  dsr_ld;   // DSR <- sign of Z
  } cur_t;

  localparam cur_t CUR_NOP = '{src: SRC_Z, dst: DST_NONE, mu_shift: 1'b0, mu3_ld: 1'b0,
                               acc: ACC_HOLD, mem_rd: 1'b0, mem_wr: 1'b0, page: 1'b0,
                               a1: A1_HOLD, a2: A2_HOLD, dsr_ld: 1'b0};

endpackage
