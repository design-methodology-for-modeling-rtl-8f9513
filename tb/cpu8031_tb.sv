// Self-checking test of the 8031 core on its own.  The testbench plays the
// external program memory: it latches the low address from P0 while ALE is
// high and, while PSENn is low, drives the code byte at {P2, latch} on P0.
// Random programs over the whole implemented instruction set (with LJMPs,
// and with the bytes skipped by forward DJNZ/CJNE branches filled with NOPs)
// are run in lockstep with the reference simulator of mcs51_iss_pkg: at
// every instruction boundary the opcode address, the code addresses read
// during the instruction, its length in clocks, ACC, PSW and the port 1
// pins must match.  It also checks that the core never drives P0 while
// PSENn is low and that port 3 stays at its reset value FFh.
module cpu8031_tb;
  import mcs51_pkg::*;
  import mcs51_iss_pkg::*;

  logic       xtal2 = 0, rst = 1;
  logic [7:0] p0_in, p0_out, p1_out, p2_out, p3_out;
  logic       p0_oe, ale, psen_n;
  monitor_t   mon;

  cpu8031 dut (.*);

  always #5 xtal2 = ~xtal2;

  logic [7:0] rom [65536];
  logic [7:0] lat;
  always_latch if (ale) lat <= p0_oe ? p0_out : 8'hFF;
  assign p0_in = p0_oe ? p0_out : (!psen_n ? rom[{p2_out, lat}] : 8'hFF);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (300_000) @(posedge xtal2);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  mcs51_iss    iss;
  bit          running = 0, started;
  logic [15:0] fq [$];
  int          clk_count, ninstr, halt_seen;
  logic [15:0] halt_at;
  logic [7:0]  p1_prev, p1_now;

  always @(posedge xtal2) if (running) begin
    clk_count++;
    check(!(p0_oe && !psen_n), "no drive on P0 while PSENn is low");
    check(p3_out == 8'hFF, "port 3 idle");
    if (!psen_n && (mon.tstate == 4'd1 || mon.tstate == 4'd7)) fq.push_back({p2_out, lat});
    if (mon.tstate == 4'd1 && !mon.m2) begin
      logic [15:0] op_a;
      op_a = fq.pop_back();
      if (started) begin
        check(clk_count == 12 * iss.cycles, $sformatf("length of instruction at %h", iss.fetch[0]));
        check(fq.size() == iss.nfetch - 1, "fetches per instruction");
        for (int i = 1; i < iss.nfetch && i <= fq.size(); i++)
          check(fq[i-1] == iss.fetch[i], $sformatf("fetch %0d of %h", i, iss.fetch[0]));
        check(mon.acc == iss.acc(), $sformatf("ACC after %h: %h expected %h", iss.fetch[0], mon.acc, iss.acc()));
        check(mon.psw == iss.psw(), $sformatf("PSW after %h: %h expected %h", iss.fetch[0], mon.psw, iss.psw()));
        check(p1_out == p1_prev, "port 1 pins");
      end
      p1_prev = p1_now;
      fq.delete();
      clk_count = 0;
      check(op_a == iss.pc, $sformatf("opcode address %h expected %h", op_a, iss.pc));
      if (iss.pc == halt_at) halt_seen++;
      iss.step();
      p1_now = iss.iram[8'h90];
      ninstr++;
      started = 1;
    end
  end

  task automatic run(int ninst);
    asm51 prog;
    prog = new();
    for (int n = 0; n < ninst; n++) begin
      logic [7:0] dir;
      logic [2:0] r;
      int k;
      r = 3'($urandom_range(0, 7));
      case ($urandom_range(0, 7))
        0, 1, 2: dir = 8'($urandom_range(8'h20, 8'h7F));
        3:       dir = 8'($urandom_range(8'h00, 8'h1F));
        4:       dir = 8'h90;
        5:       dir = 8'hD0;
        6:       dir = 8'hE0;
        default: dir = 8'($urandom_range(8'h80, 8'hFF));
      endcase
      k = $urandom_range(0, 22);
      case (k)
        0, 1, 2, 3, 4, 5, 6, 9, 12, 14, 15: prog.rop(4'(k), r);
        7, 8: prog.mov_r_imm(r, 8'($urandom));
        10: prog.mov_r_dir(r, dir);
        11: begin
          automatic int rl = $urandom_range(0, 3);
          prog.cjne(r, 8'($urandom_range(0, 2)), 8'(rl));
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
        21: prog.setb_c();
        default: begin
          automatic int target = prog.here() + 3 + $urandom_range(0, 4);
          prog.ljmp(16'(target));
          prog.org(target);
        end
      endcase
    end
    halt_at = 16'(prog.here());
    prog.halt();
    iss = new();
    foreach (rom[i]) rom[i] = 8'hFF;
    foreach (prog.code[i]) begin rom[i] = prog.code[i]; iss.rom[i] = prog.code[i]; end
    rst = 1;
    repeat (3) @(negedge xtal2);
    started = 0; ninstr = 0; halt_seen = 0; clk_count = 0;
    p1_prev = 8'hFF; p1_now = 8'hFF;
    fq.delete();
    rst = 0;
    running = 1;
    while (halt_seen < 2 && ninstr < 4 * ninst) @(negedge xtal2);
    running = 0;
    check(halt_seen >= 2, "program reached its end");
  endtask

  initial begin
    run(600);
    run(600);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
