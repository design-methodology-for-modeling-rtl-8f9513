// Instruction decoder of the 8031 core.
//
// Combinational.  The instruction register is read as two nibbles: the lower
// nibble MODE picks the addressing mode and, inside each mode, the upper
// nibble OP picks the operation.  This two-level split, instead of one
// 256-way case, is the decomposition the design is built around: for the
// register modes (lower nibble 8h..Fh) the operation is the same for all
// eight registers and IR[2:0] only names the register.
//
// Decoded set: all sixteen register-addressing operations on R0..R7
// (128 opcodes) plus LJMP, MOV A,#data, MOV direct,A, CLR C, SETB C,
// ADD A,#data and NOP.  Byte counts follow the MCS-51 opcode table; machine
// cycle counts are the MCS-51 data book values.  Any other opcode decodes
// with valid = 0 and runs as a one-byte, one-cycle no-operation; this
// fallback is this design's choice.
//
// Interface: ir in, ctrl (mcs51_pkg::ctrl_t) out.  No clock.
module instr_decoder
  import mcs51_pkg::*;
(
  input  logic [7:0] ir,
  output ctrl_t      ctrl
);

  logic [3:0] op, mode;
  assign op   = ir[7:4];
  assign mode = ir[3:0];

  always_comb begin
    ctrl = '{valid: 1'b0, nbytes: 2'd1, two_cycle: 1'b0, src: SRC_NONE,
             b_imm: 1'b0, alu_op: ALU_PASS_A, dst: DST_NONE, xch: 1'b0,
             set_cy: 1'b0, clr_cy: 1'b0, branch: BR_NONE};

    if (mode[3]) begin
      // ---------------- register addressing, Rn = IR[2:0] ----------------
      ctrl.valid = 1'b1;
      ctrl.src   = SRC_RN;
      unique case (op)
        OP_INC:     begin ctrl.alu_op = ALU_INC;  ctrl.dst = DST_RN;  end
        OP_DEC:     begin ctrl.alu_op = ALU_DEC;  ctrl.dst = DST_RN;  end
        OP_ADD:     begin ctrl.alu_op = ALU_ADD;  ctrl.dst = DST_ACC; end
        OP_ADDC:    begin ctrl.alu_op = ALU_ADDC; ctrl.dst = DST_ACC; end
        OP_ORL:     begin ctrl.alu_op = ALU_ORL;  ctrl.dst = DST_ACC; end
        OP_ANL:     begin ctrl.alu_op = ALU_ANL;  ctrl.dst = DST_ACC; end
        OP_XRL:     begin ctrl.alu_op = ALU_XRL;  ctrl.dst = DST_ACC; end
        OP_SUBB:    begin ctrl.alu_op = ALU_SUBB; ctrl.dst = DST_ACC; end
        OP_MOV_IMM: begin                         // MOV Rn,#data
          ctrl.nbytes = 2'd2; ctrl.src = SRC_IMM; ctrl.dst = DST_RN;
        end
        OP_MOV_R2D: begin                         // MOV direct,Rn
          ctrl.nbytes = 2'd2; ctrl.two_cycle = 1'b1; ctrl.dst = DST_DIR;
        end
        OP_MOV_D2R: begin                         // MOV Rn,direct
          ctrl.nbytes = 2'd2; ctrl.two_cycle = 1'b1; ctrl.src = SRC_DIR;
          ctrl.dst = DST_RN;
        end
        OP_CJNE:    begin                         // CJNE Rn,#data,rel
          ctrl.nbytes = 2'd3; ctrl.two_cycle = 1'b1; ctrl.b_imm = 1'b1;
          ctrl.alu_op = ALU_CMP; ctrl.branch = BR_CJNE;
        end
        OP_XCH:     begin                         // XCH A,Rn
          ctrl.dst = DST_ACC; ctrl.xch = 1'b1;
        end
        OP_DJNZ:    begin                         // DJNZ Rn,rel
          ctrl.nbytes = 2'd2; ctrl.two_cycle = 1'b1; ctrl.alu_op = ALU_DEC;
          ctrl.dst = DST_RN; ctrl.branch = BR_DJNZ;
        end
        OP_MOV_R2A: ctrl.dst = DST_ACC;           // MOV A,Rn
        OP_MOV_A2R: begin                         // MOV Rn,A
          ctrl.src = SRC_NONE; ctrl.alu_op = ALU_PASS_B; ctrl.dst = DST_RN;
        end
        default: ;
      endcase
    end else begin
      unique case (mode)
        MODE_IMM: begin
          if (op == OP_MOV_IMM || op == OP_ADD) begin  // MOV A,#d / ADD A,#d
            ctrl.valid  = 1'b1;
            ctrl.nbytes = 2'd2;
            ctrl.src    = SRC_IMM;
            ctrl.alu_op = (op == OP_ADD) ? ALU_ADD : ALU_PASS_A;
            ctrl.dst    = DST_ACC;
          end
        end
        MODE_DIR: begin
          if (op == OP_MOV_A2R) begin                  // MOV direct,A
            ctrl.valid  = 1'b1;
            ctrl.nbytes = 2'd2;
            ctrl.alu_op = ALU_PASS_B;
            ctrl.dst    = DST_DIR;
          end
        end
        MODE_MM2: begin
          if (op == 4'h0) begin                        // LJMP addr16
            ctrl.valid     = 1'b1;
            ctrl.nbytes    = 2'd3;
            ctrl.two_cycle = 1'b1;
            ctrl.branch    = BR_LJMP;
          end
        end
        MODE_MM3: begin
          if (op == OP_XCH) begin                      // CLR C
            ctrl.valid  = 1'b1;
            ctrl.clr_cy = 1'b1;
          end else if (op == OP_DJNZ) begin            // SETB C
            ctrl.valid  = 1'b1;
            ctrl.set_cy = 1'b1;
          end
        end
        4'h0: ctrl.valid = (op == 4'h0);               // NOP
        default: ;
      endcase
    end
  end

endmodule
