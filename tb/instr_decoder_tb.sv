// Self-checking test of the instruction decoder over all 256 opcodes.
// Byte counts come from the MCS-51 opcode table and machine-cycle counts
// from the MCS-51 data book, written here as an independent table; the
// implemented set is the sixteen register operations on R0..R7, LJMP,
// MOV A,#data, ADD A,#data, MOV direct,A, CLR C, SETB C and NOP.  For the
// register operations the ALU operation, operand source and destination
// are checked as well, and they must not depend on the register number.
module instr_decoder_tb;
  import mcs51_pkg::*;

  logic [7:0] ir;
  ctrl_t      ctrl;

  instr_decoder dut (.ir, .ctrl);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // per upper nibble of the register-mode opcodes: bytes, cycles
    int rbytes [16] = '{1, 1, 1, 1, 1, 1, 1, 2, 2, 1, 2, 3, 1, 2, 1, 1};
    int rcyc   [16] = '{1, 1, 1, 1, 1, 1, 1, 1, 2, 1, 2, 2, 1, 2, 1, 1};
    ctrl_t first;
    for (int i = 0; i < 256; i++) begin
      int eb, ec;
      bit ev;
      ir = 8'(i);
      #1;
      ev = 0; eb = 1; ec = 1;
      if (ir[3]) begin ev = 1; eb = rbytes[ir[7:4]]; ec = rcyc[ir[7:4]]; end
      else case (ir)
        8'h00, 8'hC3, 8'hD3: ev = 1;
        8'h74, 8'h24, 8'hF5: begin ev = 1; eb = 2; end
        8'h02:               begin ev = 1; eb = 3; ec = 2; end
        default: ;
      endcase
      check(ctrl.valid == ev, $sformatf("%h valid %b", ir, ctrl.valid));
      if (ev) begin
        check(int'(ctrl.nbytes) == eb, $sformatf("%h bytes %0d expected %0d", ir, ctrl.nbytes, eb));
        check(int'(ctrl.two_cycle) + 1 == ec, $sformatf("%h cycles", ir));
      end else
        check(ctrl.nbytes == 2'd1 && !ctrl.two_cycle && ctrl.dst == DST_NONE &&
              ctrl.branch == BR_NONE && !ctrl.set_cy && !ctrl.clr_cy,
              $sformatf("%h is a no-operation", ir));
      if (ir[3]) begin
        if (ir[2:0] == 0) first = ctrl;
        else check(ctrl == first, $sformatf("%h decodes like R0", ir));
      end
    end
    // some operations in detail
    ir = 8'h28; #1; check(ctrl.alu_op == ALU_ADD && ctrl.src == SRC_RN && ctrl.dst == DST_ACC, "ADD A,R0");
    ir = 8'h98; #1; check(ctrl.alu_op == ALU_SUBB && ctrl.dst == DST_ACC, "SUBB A,R0");
    ir = 8'h88; #1; check(ctrl.src == SRC_RN && ctrl.dst == DST_DIR, "MOV dir,R0");
    ir = 8'hA8; #1; check(ctrl.src == SRC_DIR && ctrl.dst == DST_RN, "MOV R0,dir");
    ir = 8'hB8; #1; check(ctrl.alu_op == ALU_CMP && ctrl.b_imm && ctrl.branch == BR_CJNE, "CJNE");
    ir = 8'hD8; #1; check(ctrl.alu_op == ALU_DEC && ctrl.dst == DST_RN && ctrl.branch == BR_DJNZ, "DJNZ");
    ir = 8'hC8; #1; check(ctrl.xch && ctrl.dst == DST_ACC, "XCH");
    ir = 8'hF8; #1; check(ctrl.alu_op == ALU_PASS_B && ctrl.dst == DST_RN, "MOV R0,A");
    ir = 8'hE8; #1; check(ctrl.alu_op == ALU_PASS_A && ctrl.dst == DST_ACC, "MOV A,R0");
    ir = 8'h78; #1; check(ctrl.src == SRC_IMM && ctrl.dst == DST_RN, "MOV R0,#d");
    ir = 8'h08; #1; check(ctrl.alu_op == ALU_INC && ctrl.dst == DST_RN, "INC R0");
    ir = 8'h74; #1; check(ctrl.src == SRC_IMM && ctrl.alu_op == ALU_PASS_A && ctrl.dst == DST_ACC, "MOV A,#d");
    ir = 8'h24; #1; check(ctrl.src == SRC_IMM && ctrl.alu_op == ALU_ADD, "ADD A,#d");
    ir = 8'hF5; #1; check(ctrl.alu_op == ALU_PASS_B && ctrl.dst == DST_DIR, "MOV dir,A");
    ir = 8'h02; #1; check(ctrl.branch == BR_LJMP, "LJMP");
    ir = 8'hC3; #1; check(ctrl.clr_cy && !ctrl.set_cy, "CLR C");
    ir = 8'hD3; #1; check(ctrl.set_cy && !ctrl.clr_cy, "SETB C");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
