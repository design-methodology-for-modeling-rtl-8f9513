// 8031 microcontroller core, instruction-set level, cycle-accurate at the
// pins for the implemented instructions.
//
// The 8031 has no on-chip program memory: every code byte is fetched from an
// external memory over port 0 (low address, then data) and port 2 (high
// address), strobed by ALE and PSENn.  This core reproduces that bus
// timing, T state by T state, and executes the register-addressing
// instructions on R0..R7 (INC, DEC, ADD, ADDC, ORL, ANL, XRL, SUBB, XCH,
// MOV A,Rn, MOV Rn,A, MOV Rn,#data, MOV direct,Rn, MOV Rn,direct,
// DJNZ Rn,rel, CJNE Rn,#data,rel) plus LJMP, MOV A,#data, ADD A,#data,
// MOV direct,A, CLR C, SETB C and NOP.  Other opcodes run as one-byte,
// one-cycle no-operations.
//
// Schedule of one instruction (actions happen at the clock edge that ends
// the named T state; M1 is the first machine cycle, M2 the second):
//   M1 T1   opcode on P0 -> IR, PC + 1; port drivers take the port latches
//   M1 T2   IR decoded into the control word; PAR <= PC (also at every T2/T8)
//   T3/T9   PAR drives P0 (low byte) and P2 (high byte); ALE high in T2-T3
//   M1 T6   CLR C / SETB C
//   M1 T7   second code byte -> byte2; PC + 1 if that byte is consumed here
//   M1 T9   RAR <= operand address (Rn of the PSW bank, or byte2);
//           Tmp2 <= ACC (byte2 for CJNE)
//   M1 T10  Tmp1 <= RAM(RAR) (byte2 for immediates)
//   M1 T11  ALUout <= ALU(Tmp1, Tmp2), flags computed
//   M1 T12  result written to ACC, Rn or a direct address; flags written
//   M2 T1   third code byte -> byte3 (LJMP, CJNE)
//   M2 T7   PC + 1 for the last consumed byte, plus the relative offset of a
//           taken DJNZ/CJNE, or PC <= {byte2, byte3} for LJMP
// A one-byte instruction reads the byte after its opcode once and throws
// it away, and the next opcode is then read again from the same address, as
// the original part does.  Executing in T9..T12 of M1 follows the
// register-transfer table of the design for ADD A,Rn; the position of the PC
// increments for two-cycle instructions is chosen to reproduce the address
// sequence seen on the real part's port 0.
//
// Interface: xtal2 is the oscillator clock (one T state per period), rst is
// synchronous and active high.  P0 is split into p0_in, p0_out and p0_oe
// (p0_oe high only while the low address byte is driven).  P1 and P3 drive
// their SFR latches, updated at M1 T1.  mon brings out PC, IR, ACC, PSW and
// the T state for observation.  Reading a port address returns the latch.
module cpu8031
  import mcs51_pkg::*;
(
  input  logic       xtal2,
  input  logic       rst,
  input  logic [7:0] p0_in,
  output logic [7:0] p0_out,
  output logic       p0_oe,
  output logic [7:0] p1_out,
  output logic [7:0] p2_out,
  output logic [7:0] p3_out,
  output logic       ale,
  output logic       psen_n,
  output monitor_t   mon
);

  logic clk;
  assign clk = xtal2;

  // ---------------- sequencer ----------------
  tstate_t t;
  logic    m2, addr_drive, sample;
  ctrl_t   ctrl_d, ctrl;

  timing_control u_timing (
    .clk, .rst, .two_cycle(ctrl.two_cycle), .tstate(t), .m2, .ale, .psen_n,
    .addr_drive, .sample
  );

  logic m1t1, m1t2, m1t6, m1t7, m1t9, m1t10, m1t11, m1t12, m2t1, m2t7;
  assign m1t1  = !m2 && t == 4'd1;
  assign m1t2  = !m2 && t == 4'd2;
  assign m1t6  = !m2 && t == 4'd6;
  assign m1t7  = !m2 && t == 4'd7;
  assign m1t9  = !m2 && t == 4'd9;
  assign m1t10 = !m2 && t == 4'd10;
  assign m1t11 = !m2 && t == 4'd11;
  assign m1t12 = !m2 && t == 4'd12;
  assign m2t1  =  m2 && t == 4'd1;
  assign m2t7  =  m2 && t == 4'd7;

  // ---------------- instruction register and decode ----------------
  logic [7:0] ir, byte2, byte3;

  instr_decoder u_dec (.ir, .ctrl(ctrl_d));

  // ---------------- program counter ----------------
  logic [15:0] pc, par;
  logic        pc_inc, pc_rel, pc_jump;
  logic        take_branch;

  always_comb begin
    pc_inc  = 1'b0;
    pc_rel  = 1'b0;
    pc_jump = 1'b0;
    if (m1t1) pc_inc = 1'b1;
    if (m1t7) pc_inc = (ctrl.nbytes == 2'd3) ||
                       (ctrl.nbytes == 2'd2 && !ctrl.two_cycle);
    if (m2t7) begin
      if (ctrl.branch == BR_LJMP) pc_jump = 1'b1;
      else begin
        pc_inc = ctrl.nbytes != 2'd1;
        pc_rel = take_branch;
      end
    end
  end

  program_counter u_pc (
    .clk, .rst, .inc(pc_inc), .rel_add(pc_rel),
    .rel(ctrl.branch == BR_CJNE ? byte3 : byte2),
    .jump(pc_jump), .target({byte2, byte3}),
    .par_load(t == 4'd2 || t == 4'd8), .pc, .par
  );

  // ---------------- internal data memory ----------------
  logic [7:0] rar, tmp1, tmp2, alu_q;
  logic [7:0] ram_rdata, sfr_rdata, mem_rdata;
  logic [7:0] acc, psw, p0_latch, p1_latch, p2_latch, p3_latch;
  logic [7:0] rn_addr, waddr, wdata;
  logic       wr;

  assign rn_addr   = {3'b000, psw[PSW_RS1], psw[PSW_RS0], ir[2:0]};
  assign mem_rdata = rar[7] ? sfr_rdata : ram_rdata;

  // result write at M1 T12
  always_comb begin
    wr    = m1t12 && (ctrl.dst == DST_RN || ctrl.dst == DST_DIR || ctrl.xch);
    waddr = (ctrl.dst == DST_DIR) ? byte2 : rn_addr;
    wdata = ctrl.xch ? tmp2 : alu_q;
  end

  data_ram #(.DEPTH(128)) u_ram (
    .clk, .rst, .raddr(rar[6:0]), .rdata(ram_rdata),
    .we(wr && !waddr[7]), .waddr(waddr[6:0]), .wdata
  );

  // ---------------- ALU ----------------
  logic [7:0] alu_y;
  logic       alu_cy, alu_ac, alu_ov, alu_cy_we, alu_acov_we, alu_zero, alu_eq;
  logic       f_cy, f_ac, f_ov, f_cy_we, f_acov_we, f_eq;

  mcs51_alu u_alu (
    .op(ctrl.alu_op), .a(tmp1), .b(tmp2), .cy_in(psw[PSW_CY]),
    .result(alu_y), .cy_out(alu_cy), .ac_out(alu_ac), .ov_out(alu_ov),
    .cy_we(alu_cy_we), .acov_we(alu_acov_we), .zero(alu_zero), .equal(alu_eq)
  );

  logic acc_we, cy_we, cy_d;
  always_comb begin
    acc_we = m1t12 && ctrl.dst == DST_ACC;
    cy_we  = (m1t12 && f_cy_we) || (m1t6 && (ctrl.set_cy || ctrl.clr_cy));
    cy_d   = m1t6 ? ctrl.set_cy : f_cy;
  end

  sfr_file u_sfr (
    .clk, .rst, .raddr(rar[6:0]), .rdata(sfr_rdata),
    .we(wr && waddr[7]), .waddr(waddr[6:0]), .wdata,
    .acc_we, .acc_d(alu_q), .cy_we, .cy_d,
    .acov_we(m1t12 && f_acov_we), .ac_d(f_ac), .ov_d(f_ov),
    .acc, .psw, .p0_latch, .p1_latch, .p2_latch, .p3_latch
  );

  // ---------------- datapath registers ----------------
  logic [7:0] p1_drv, p3_drv, p2_drv;

  always_ff @(posedge clk) begin
    if (rst) begin
      ir          <= 8'h00;
      ctrl        <= '0;
      byte2       <= 8'h00;
      byte3       <= 8'h00;
      rar         <= 8'h00;
      tmp1        <= 8'h00;
      tmp2        <= 8'h00;
      alu_q       <= 8'h00;
      f_cy        <= 1'b0;
      f_ac        <= 1'b0;
      f_ov        <= 1'b0;
      f_cy_we     <= 1'b0;
      f_acov_we   <= 1'b0;
      f_eq        <= 1'b0;
      take_branch <= 1'b0;
      p1_drv      <= 8'hFF;
      p2_drv      <= 8'h00;
      p3_drv      <= 8'hFF;
    end else begin
      if (m1t1) begin
        ir     <= p0_in;
        p1_drv <= p1_latch;
        p3_drv <= p3_latch;
      end
      if (m1t2) ctrl <= ctrl_d;
      if (t == 4'd3 || t == 4'd9) p2_drv <= par[15:8];
      if (m1t7 && ctrl.nbytes != 2'd1) byte2 <= p0_in;
      if (m2t1 && ctrl.nbytes == 2'd3) byte3 <= p0_in;
      if (m1t9) begin
        rar  <= (ctrl.src == SRC_DIR) ? byte2 : rn_addr;
        tmp2 <= ctrl.b_imm ? byte2 : acc;
      end
      if (m1t10) tmp1 <= (ctrl.src == SRC_IMM) ? byte2 : mem_rdata;
      if (m1t11) begin
        alu_q     <= alu_y;
        f_cy      <= alu_cy;
        f_ac      <= alu_ac;
        f_ov      <= alu_ov;
        f_cy_we   <= alu_cy_we;
        f_acov_we <= alu_acov_we;
        f_eq      <= alu_eq;
      end
      if (m1t12)
        take_branch <= (ctrl.branch == BR_DJNZ && alu_q != 8'd0) ||
                       (ctrl.branch == BR_CJNE && !f_eq);
    end
  end

  // the zero flag of the ALU is not needed here: DJNZ tests the registered
  // result, so the flag output stays open
  logic unused_ok;
  assign unused_ok = &{1'b0, alu_zero, p0_latch, p2_latch, sample};

  // ---------------- pins ----------------
  assign p0_oe  = addr_drive;
  assign p0_out = par[7:0];
  assign p2_out = p2_drv;
  assign p1_out = p1_drv;
  assign p3_out = p3_drv;

  assign mon = '{pc: pc, ir: ir, acc: acc, psw: psw, tstate: t, m2: m2,
                 op_valid: ctrl.valid};

  // the core never drives P0 while the program memory is enabled
  a_no_contention: assert property (@(posedge clk) disable iff (rst)
                                    !(p0_oe && !psen_n));

endmodule
