// End-to-end test of the minimum system (8031 core + address latch + EPROM)
// at its default size.
//
// Three programs are burned into the EPROM through its programming port and
// run from reset:
//   1. the eight-instruction demonstration program (LJMP, MOV A,#08h,
//      MOV PSW,A to select register bank 1, MOV 09h,A, MOV 08h,A,
//      ADD A,R1, ADD A,R0), which must leave 0Ch in ACC; its first code
//      fetches must show the address/data pairs 0000/02, 0001/00, 0002/0Ah,
//      0002/0Ah, 000Ah/74h;
//   2. the register-R0 test program, whose results are written to port 1;
//      the pins must show the sequence of values listed with that program
//      (it starts at 000Ah; the four bytes before its first listed
//      instruction at 000Eh select register bank 1, so that address 08h,
//      which the program writes directly, is R0);
//   3. a random program over the whole implemented instruction set.
// During every run the core is compared, instruction by instruction, with
// the reference simulator of mcs51_iss_pkg: code addresses fetched (two per
// machine cycle, read through the latch and port 2), the code byte on P0,
// the clock count of every instruction (12 per machine cycle), ACC and PSW
// at every instruction boundary and the port 1 pins.  ALE and PSENn are
// checked against the T-state table in every clock.  At the end each
// mechanism (LJMP, taken and untaken DJNZ and CJNE, two-cycle instructions,
// discarded fetches, register bank other than 0, carry in, CLR/SETB C, XCH,
// borrow, port write) must have occurred at least once.
module min_system_tb;
  import mcs51_pkg::*;
  import mcs51_iss_pkg::*;

  logic        xtal2 = 1'b0;
  logic        rst   = 1'b1;
  logic        pgm_we = 1'b0;
  logic [12:0] pgm_addr = '0;
  logic [7:0]  pgm_data = '0;
  logic [7:0]  p0, p1, p2, p3;
  logic        ale, psen_n;
  monitor_t    mon;

  min_system dut (.*);

  always #5 xtal2 = ~xtal2;

  int checks = 0, failures = 0;
  int total_events [EV_NUM];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // watchdog
  initial begin
    repeat (400_000) @(posedge xtal2);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ALE / PSENn per T state, from the machine-cycle table
  localparam logic [12:1] ALE_T  = 12'b0001_1000_0110;  // bit n = T state n
  localparam logic [12:1] PSEN_T = 12'b0011_1000_1110;
  always @(posedge xtal2) if (!rst) begin
    check(ale    == ALE_T[mon.tstate],  $sformatf("ALE in T%0d", mon.tstate));
    check(psen_n == PSEN_T[mon.tstate], $sformatf("PSENn in T%0d", mon.tstate));
  end

  // ---------------- lockstep against the reference simulator ----------------
  mcs51_iss    iss;
  bit          running = 0;
  bit          started;
  logic [15:0] fq_addr [$];
  logic [7:0]  fq_data [$];
  int          clk_count;
  int          ninstr;
  logic [15:0] halt_at;
  int          halt_seen;
  logic [7:0]  p1_prev_latch, p1_now_latch;
  logic [7:0]  p1_trace [$];
  logic [15:0] first_addr [$];
  logic [7:0]  first_data [$];

  always @(posedge xtal2) if (running) begin
    clk_count++;
    // a code byte is read at the end of T1 and T7
    if (!psen_n && (mon.tstate == 4'd1 || mon.tstate == 4'd7)) begin
      logic [15:0] a;
      a = {p2, dut.u_latch.q};
      if (first_addr.size() < 10) begin first_addr.push_back(a); first_data.push_back(p0); end
      fq_addr.push_back(a);
      fq_data.push_back(p0);
    end
    if (p1_trace.size() == 0 || p1_trace[$] != p1) p1_trace.push_back(p1);
    // instruction boundary: M1 T1
    if (mon.tstate == 4'd1 && !mon.m2) begin
      logic [15:0] op_a;
      logic [7:0]  op_d;
      op_a = fq_addr.pop_back();
      op_d = fq_data.pop_back();
      if (started) begin
        // bus activity and length of the instruction just finished
        check(clk_count == 12 * iss.cycles,
              $sformatf("instr %0d at %h: %0d clocks, expected %0d", ninstr, iss.fetch[0],
                        clk_count, 12 * iss.cycles));
        check(fq_addr.size() == iss.nfetch - 1, $sformatf("fetch count at %h", iss.fetch[0]));
        for (int i = 1; i < iss.nfetch && i <= fq_addr.size(); i++) begin
          check(fq_addr[i-1] == iss.fetch[i],
                $sformatf("fetch %0d address %h, expected %h", i, fq_addr[i-1], iss.fetch[i]));
          check(fq_data[i-1] == iss.rom[fq_addr[i-1]], "code byte on P0");
        end
        // architectural state after it
        check(mon.acc == iss.acc(), $sformatf("ACC %h, expected %h after %h",
                                                mon.acc, iss.acc(), iss.fetch[0]));
        check(mon.psw == iss.psw(), $sformatf("PSW %h, expected %h after %h",
                                                mon.psw, iss.psw(), iss.fetch[0]));
        check(p1 == p1_prev_latch, $sformatf("P1 pins %h, expected %h", p1, p1_prev_latch));
      end
      p1_prev_latch = p1_now_latch;
      fq_addr.delete();
      fq_data.delete();
      clk_count = 0;
      // the new instruction
      check(op_a == iss.pc, $sformatf("opcode fetched at %h, expected %h", op_a, iss.pc));
      check(op_d == iss.rom[op_a], "opcode byte on P0");
      if (iss.pc == halt_at) halt_seen++;
      iss.step();
      p1_now_latch = iss.iram[8'h90];
      ninstr++;
      started = 1;
    end
  end

  task automatic run_program(asm51 prog, logic [15:0] halt_addr, int max_instr);
    // burn the EPROM while the core is held in reset
    rst = 1'b1;
    iss = new();
    @(negedge xtal2);
    for (int i = 0; i < 8192; i++) begin
      pgm_we   = 1'b1;
      pgm_addr = 13'(i);
      pgm_data = (i < prog.code.size()) ? prog.code[i] : 8'hFF;
      if (i < prog.code.size()) iss.rom[i] = prog.code[i];
      @(negedge xtal2);
    end
    pgm_we = 1'b0;
    fq_addr.delete();
    fq_data.delete();
    first_addr.delete();
    first_data.delete();
    p1_trace.delete();
    started = 0;
    ninstr = 0;
    halt_at = halt_addr;
    halt_seen = 0;
    p1_prev_latch = 8'hFF;
    p1_now_latch = 8'hFF;
    clk_count = 0;
    repeat (2) @(negedge xtal2);
    rst = 1'b0;
    running = 1;
    while (halt_seen < 2 && ninstr < max_instr) @(negedge xtal2);
    running = 0;
    check(halt_seen >= 2, "program reached its end");
    foreach (iss.events[i]) total_events[i] += iss.events[i];
  endtask

  initial begin
    asm51 prog;
    logic [7:0] exp_p1 [$];
    logic [15:0] halt_addr;

    // ---------------- 1. demonstration program ----------------
    prog = new();
    prog.ljmp(16'h000A);
    prog.org(16'h0A);
    prog.mov_a_imm(8'h08);
    prog.mov_dir_a(8'hD0);          // MOV PSW,A: bank 1
    prog.mov_a_imm(8'h04);
    prog.mov_dir_a(8'h09);
    prog.mov_dir_a(8'h08);
    prog.rop(4'h2, 3'd1);           // ADD A,R1
    prog.rop(4'h2, 3'd0);           // ADD A,R0
    halt_addr = 16'(prog.here());
    prog.halt();
    run_program(prog, halt_addr, 100);
    check(mon.acc == 8'h0C, $sformatf("demo program ACC %h, expected 0C", mon.acc));
    check(mon.psw[4:3] == 2'b01, "demo program selects bank 1");
    begin
      logic [15:0] ea [5] = '{16'h0000, 16'h0001, 16'h0002, 16'h0002, 16'h000A};
      logic [7:0]  ed [5] = '{8'h02, 8'h00, 8'h0A, 8'h0A, 8'h74};
      for (int i = 0; i < 5; i++) begin
        check(first_addr[i] == ea[i] && first_data[i] == ed[i],
              $sformatf("first fetches %0d: %h/%h", i, first_addr[i], first_data[i]));
      end
    end

    // ---------------- 2. register R0 test program ----------------
    prog = new();
    prog.ljmp(16'h000A);
    prog.org(16'h0A);
    prog.mov_a_imm(8'h08); prog.mov_dir_a(8'hD0);               // bank 1: R0 = 08h
    prog.mov_a_imm(8'h01); prog.mov_dir_a(8'h08); prog.mov_dir_r(8'h90, 0);
    prog.rop(4'h0, 0); prog.mov_dir_r(8'h90, 0);                 // INC R0
    prog.rop(4'h1, 0); prog.mov_dir_r(8'h90, 0);                 // DEC R0
    prog.rop(4'h2, 0); prog.mov_dir_a(8'h90);                    // ADD A,R0
    prog.setb_c(); prog.rop(4'h3, 0); prog.mov_dir_a(8'h90);     // ADDC A,R0
    prog.rop(4'h4, 0); prog.mov_dir_a(8'h90);                    // ORL A,R0
    prog.rop(4'h5, 0); prog.mov_dir_a(8'h90);                    // ANL A,R0
    prog.rop(4'h6, 0); prog.mov_dir_a(8'h90);                    // XRL A,R0
    prog.mov_r_imm(0, 8'h20); prog.mov_dir_r(8'h90, 0);
    prog.rop(4'hE, 0); prog.mov_dir_a(8'h90);                    // MOV A,R0
    prog.mov_r_imm(0, 8'h0B); prog.mov_dir_r(8'h90, 0);
    prog.clr_c(); prog.setb_c(); prog.rop(4'h9, 0); prog.mov_dir_a(8'h90); // SUBB
    prog.mov_r_imm(0, 8'h22); prog.mov_dir_r(8'hB3, 0);
    prog.mov_r_imm(0, 8'h48); prog.mov_r_dir(0, 8'hB3); prog.mov_dir_r(8'h90, 0);
    prog.mov_r_imm(0, 8'h01); prog.djnz(0, 8'h10);
    prog.mov_r_imm(0, 8'h02); prog.djnz(0, 8'h04);
    prog.b(8'h00); prog.b(8'h00); prog.b(8'h00); prog.b(8'h00);
    prog.mov_r_imm(0, 8'h48); prog.cjne(0, 8'h48, 8'h04); prog.cjne(0, 8'h50, 8'h04);
    prog.b(8'h00); prog.b(8'h00); prog.b(8'h00); prog.b(8'h00);
    prog.mov_r_imm(0, 8'h03); prog.mov_a_imm(8'h0C); prog.rop(4'hC, 0); // XCH
    prog.mov_dir_a(8'h90); prog.mov_dir_r(8'h90, 0);
    prog.mov_r_imm(0, 8'h05); prog.mov_a_imm(8'h09); prog.rop(4'hE, 0);
    prog.mov_dir_a(8'h90);
    prog.mov_r_imm(0, 8'h02); prog.mov_a_imm(8'h04); prog.rop(4'hF, 0); // MOV R0,A
    prog.mov_dir_r(8'h90, 0);
    halt_addr = 16'(prog.here());
    prog.halt();
    run_program(prog, halt_addr, 200);
    exp_p1 = '{8'hFF, 8'h01, 8'h02, 8'h01, 8'h02, 8'h04, 8'h05, 8'h01, 8'h00, 8'h20,
               8'h0B, 8'h14, 8'h22, 8'h03, 8'h0C, 8'h05, 8'h04};
    check(p1_trace.size() == exp_p1.size(),
          $sformatf("port 1 showed %0d values, expected %0d", p1_trace.size(), exp_p1.size()));
    foreach (exp_p1[i])
      if (i < p1_trace.size())
        check(p1_trace[i] == exp_p1[i],
              $sformatf("port 1 value %0d: %h, expected %h", i, p1_trace[i], exp_p1[i]));

    // ---------------- 3. random program ----------------
    prog = new();
    for (int n = 0; n < 1500; n++) begin
      int k;
      logic [7:0] dir;
      logic [2:0] r;
      r = 3'($urandom_range(0, 7));
      case ($urandom_range(0, 9))
        0, 1, 2: dir = 8'($urandom_range(8'h30, 8'h7F));
        3:       dir = 8'($urandom_range(8'h00, 8'h1F));
        4:       dir = 8'h90;
        5:       dir = 8'hD0;
        6:       dir = 8'hE0;
        7:       dir = 8'hF0;
        default: dir = 8'hB3;
      endcase
      k = $urandom_range(0, 21);
      case (k)
        0, 1, 2, 3, 4, 5, 6, 9, 12, 14, 15:
          prog.rop(4'(k), r);                                   // one-byte ops
        7, 8: prog.mov_r_imm(r, 8'($urandom));
        10: prog.mov_r_dir(r, dir);
        11: begin
          automatic int rl = $urandom_range(0, 3);
          prog.cjne(r, 8'($urandom_range(0, 3)), 8'(rl));
          repeat (rl) prog.b(8'h00);
        end
        13: begin
          automatic int rl = $urandom_range(0, 3);
          prog.djnz(r, 8'(rl));
          repeat (rl) prog.b(8'h00);
        end
        16: prog.mov_dir_r(dir, r);
        17: prog.mov_a_imm(8'($urandom));
        18: prog.add_a_imm(8'($urandom));
        19: prog.mov_dir_a(dir);
        20: prog.clr_c();
        default: prog.setb_c();
      endcase
      if (n % 300 == 299) begin           // an LJMP over a gap now and then
        automatic int target = prog.here() + 3 + $urandom_range(0, 5);
        prog.ljmp(16'(target));
        prog.org(target);
      end
    end
    halt_addr = 16'(prog.here());
    prog.halt();
    check(prog.code.size() < 8192, "random program fits the EPROM");
    run_program(prog, halt_addr, 5000);

    // ---------------- coverage of the mechanisms ----------------
    for (int i = 0; i < EV_NUM; i++) begin
      automatic event_e e = event_e'(i);
      $display("mechanism %-16s occurred %0d times", e.name(), total_events[i]);
      check(total_events[i] > 0, $sformatf("mechanism %s never occurred", e.name()));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
