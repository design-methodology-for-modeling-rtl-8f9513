// Shared types and constants of the 8031 instruction-set core.
//
// An 8031 instruction byte is split in two nibbles: the upper nibble (OP)
// names the operation and the lower nibble (MODE) names the addressing mode.
// The decoder looks at MODE first and OP second.  The nibble codes below are
// the MCS-51 opcode map.  The control word ctrl_t is this design's own
// encoding of what the decoder tells the datapath; it is not taken from the
// original part.
//
// Timing vocabulary: one machine cycle is twelve oscillator periods T1..T12
// (the six states S1..S6 of the data book, two phases each).  A machine cycle
// is M1 or M2; no implemented instruction needs more than two.
package mcs51_pkg;

  // ---- lower nibble: addressing mode ----
  localparam logic [3:0] MODE_IMM  = 4'h4;   // immediate (xx4)
  localparam logic [3:0] MODE_DIR  = 4'h5;   // direct (xx5)
  localparam logic [3:0] MODE_MM2  = 4'h2;   // mixed set 2 (LJMP at 02h)
  localparam logic [3:0] MODE_MM3  = 4'h3;   // mixed set 3 (CLR C C3h, SETB C D3h)
  // lower nibbles 8h..Fh: register addressing R0..R7 (IR[2:0] = register)

  // ---- upper nibble: operation ----
  localparam logic [3:0] OP_INC      = 4'h0;
  localparam logic [3:0] OP_DEC      = 4'h1;
  localparam logic [3:0] OP_ADD      = 4'h2;
  localparam logic [3:0] OP_ADDC     = 4'h3;
  localparam logic [3:0] OP_ORL      = 4'h4;
  localparam logic [3:0] OP_ANL      = 4'h5;
  localparam logic [3:0] OP_XRL      = 4'h6;
  localparam logic [3:0] OP_MOV_IMM  = 4'h7;   // MOV Rn,#data / MOV A,#data
  localparam logic [3:0] OP_MOV_R2D  = 4'h8;   // MOV direct,Rn
  localparam logic [3:0] OP_SUBB     = 4'h9;
  localparam logic [3:0] OP_MOV_D2R  = 4'hA;   // MOV Rn,direct
  localparam logic [3:0] OP_CJNE     = 4'hB;
  localparam logic [3:0] OP_XCH      = 4'hC;   // also CLR C with MODE_MM3
  localparam logic [3:0] OP_DJNZ     = 4'hD;   // also SETB C with MODE_MM3
  localparam logic [3:0] OP_MOV_R2A  = 4'hE;   // MOV A,Rn
  localparam logic [3:0] OP_MOV_A2R  = 4'hF;   // MOV Rn,A / MOV direct,A

  // ---- SFR direct addresses (data book) ----
  localparam logic [7:0] SFR_P0   = 8'h80;
  localparam logic [7:0] SFR_SP   = 8'h81;
  localparam logic [7:0] SFR_DPL  = 8'h82;
  localparam logic [7:0] SFR_DPH  = 8'h83;
  localparam logic [7:0] SFR_PCON = 8'h87;
  localparam logic [7:0] SFR_TCON = 8'h88;
  localparam logic [7:0] SFR_TMOD = 8'h89;
  localparam logic [7:0] SFR_TL0  = 8'h8A;
  localparam logic [7:0] SFR_TL1  = 8'h8B;
  localparam logic [7:0] SFR_TH0  = 8'h8C;
  localparam logic [7:0] SFR_TH1  = 8'h8D;
  localparam logic [7:0] SFR_P1   = 8'h90;
  localparam logic [7:0] SFR_SCON = 8'h98;
  localparam logic [7:0] SFR_SBUF = 8'h99;
  localparam logic [7:0] SFR_P2   = 8'hA0;
  localparam logic [7:0] SFR_IE   = 8'hA8;
  localparam logic [7:0] SFR_P3   = 8'hB0;
  localparam logic [7:0] SFR_IP   = 8'hB8;
  localparam logic [7:0] SFR_PSW  = 8'hD0;
  localparam logic [7:0] SFR_ACC  = 8'hE0;
  localparam logic [7:0] SFR_B    = 8'hF0;

  // PSW bit positions
  localparam int PSW_CY  = 7;
  localparam int PSW_AC  = 6;
  localparam int PSW_F0  = 5;
  localparam int PSW_RS1 = 4;
  localparam int PSW_RS0 = 3;
  localparam int PSW_OV  = 2;
  localparam int PSW_P   = 0;

  // ---- ALU operations ----
  typedef enum logic [3:0] {
    ALU_PASS_A,   // result = a (operand, Tmp1)
    ALU_PASS_B,   // result = b (accumulator copy, Tmp2)
    ALU_ADD,
    ALU_ADDC,
    ALU_SUBB,
    ALU_ORL,
    ALU_ANL,
    ALU_XRL,
    ALU_INC,      // a + 1, no flags
    ALU_DEC,      // a - 1, no flags
    ALU_CMP       // CJNE compare: CY = a < b
  } alu_op_e;

  // where the operand latched into Tmp1 comes from
  typedef enum logic [1:0] {
    SRC_NONE,
    SRC_RN,       // internal RAM at the selected bank's Rn
    SRC_DIR,      // direct address in the second instruction byte
    SRC_IMM       // the second instruction byte itself
  } src_e;

  // where the ALU result is written
  typedef enum logic [1:0] {
    DST_NONE,
    DST_ACC,
    DST_RN,
    DST_DIR
  } dst_e;

  typedef enum logic [1:0] {
    BR_NONE,
    BR_LJMP,      // PC <= {byte2, byte3}
    BR_DJNZ,      // PC += rel (byte2) when the result is not zero
    BR_CJNE       // PC += rel (byte3) when the operands differ
  } branch_e;

  typedef struct packed {
    logic       valid;      // opcode is one of the implemented set
    logic [1:0] nbytes;     // 1..3
    logic       two_cycle;  // 1: two machine cycles, 0: one
    src_e       src;
    logic       b_imm;      // Tmp2 <= second byte instead of ACC
    alu_op_e    alu_op;
    dst_e       dst;
    logic       xch;        // also write Tmp2 (old ACC) to Rn, result to ACC
    logic       set_cy;
    logic       clr_cy;
    branch_e    branch;
  } ctrl_t;

  // T state numbers, 1..12
  typedef logic [3:0] tstate_t;

  // observation bundle brought out of the core for monitoring
  typedef struct packed {
    logic [15:0] pc;
    logic [7:0]  ir;
    logic [7:0]  acc;
    logic [7:0]  psw;
    tstate_t     tstate;
    logic        m2;
    logic        op_valid;   // IR holds an implemented opcode
  } monitor_t;

endpackage
