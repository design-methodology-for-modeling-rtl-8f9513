// Reference instruction-set simulator and program builder used by the
// testbenches of the 8031 core.
//
// The simulator executes one instruction per call of step() on its own
// copy of the program, internal data space and PC, written from the MCS-51
// instruction definitions independently of the RTL.  For every instruction
// it also predicts what the bus must show: the number of machine cycles and
// the list of code addresses fetched (two per machine cycle: the opcode,
// then the following byte, read and discarded if not needed; the second
// machine cycle of a two-byte instruction re-reads its last byte, that of a
// three-byte one its third byte).  It counts the mechanisms a test has to
// reach (jumps, taken and untaken branches, discarded fetches, bank
// switching, carry use) so that a testbench can check they happened.
//
// The program builder appends assembled instructions to a byte queue.
package mcs51_iss_pkg;

  typedef enum int {
    EV_LJMP, EV_DJNZ_TAKEN, EV_DJNZ_FALL, EV_CJNE_TAKEN, EV_CJNE_FALL,
    EV_TWO_CYCLE, EV_DISCARD, EV_BANK_NONZERO, EV_CARRY_IN, EV_SETB_CLR,
    EV_XCH, EV_PORT_WRITE, EV_BORROW, EV_NUM
  } event_e;

  class mcs51_iss;
    logic [7:0]  rom [65536];
    logic [7:0]  iram [256];
    logic [15:0] pc;
    int          events [EV_NUM];
    // predictions for the last executed instruction
    int          cycles;
    logic [15:0] fetch [4];
    int          nfetch;
    logic [7:0]  p1_write;
    bit          p1_written;

    function new();
      foreach (rom[i]) rom[i] = 8'hFF;
      reset();
    endfunction

    function void reset();
      foreach (iram[i]) iram[i] = 8'h00;
      iram[8'h81] = 8'h07;
      iram[8'h80] = 8'hFF; iram[8'h90] = 8'hFF;
      iram[8'hA0] = 8'hFF; iram[8'hB0] = 8'hFF;
      pc = 16'h0000;
      foreach (events[i]) events[i] = 0;
    endfunction

    function logic [7:0] acc(); return iram[8'hE0]; endfunction
    function logic [7:0] psw();
      return {iram[8'hD0][7:1], ^iram[8'hE0]};
    endfunction
    function logic cy(); return iram[8'hD0][7]; endfunction

    function logic [7:0] rn_addr(logic [2:0] r);
      return {3'b000, iram[8'hD0][4:3], r};
    endfunction

    function logic [7:0] rd(logic [7:0] a);
      return (a == 8'hD0) ? psw() : iram[a];
    endfunction

    function void wr(logic [7:0] a, logic [7:0] d);
      iram[a] = d;
      if (a == 8'h90) begin p1_written = 1; p1_write = d; events[EV_PORT_WRITE]++; end
    endfunction

    function void set_cy(logic c); iram[8'hD0][7] = c; endfunction

    // A + b + cin with CY, AC, OV
    function void add(logic [7:0] b, logic cin);
      logic [7:0] a;
      logic [8:0] s;
      logic [4:0] n;
      a = acc();
      s = {1'b0, a} + {1'b0, b} + 9'(cin);
      n = {1'b0, a[3:0]} + {1'b0, b[3:0]} + 5'(cin);
      iram[8'hD0][7] = s[8];
      iram[8'hD0][6] = n[4];
      iram[8'hD0][2] = (a[7] == b[7]) && (s[7] != a[7]);
      iram[8'hE0] = s[7:0];
    endfunction

    function void subb(logic [7:0] b);
      logic [7:0] a;
      logic [8:0] s;
      logic [4:0] n;
      logic       cin;
      a   = acc();
      cin = cy();
      s = {1'b0, a} - {1'b0, b} - 9'(cin);
      n = {1'b0, a[3:0]} - {1'b0, b[3:0]} - 5'(cin);
      if (s[8]) events[EV_BORROW]++;
      iram[8'hD0][7] = s[8];
      iram[8'hD0][6] = n[4];
      iram[8'hD0][2] = (a[7] != b[7]) && (s[7] != a[7]);
      iram[8'hE0] = s[7:0];
    endfunction

    function logic [15:0] rel(logic [15:0] next, logic [7:0] r);
      return next + {{8{r[7]}}, r};
    endfunction

    // execute the instruction at pc
    function void step();
      logic [7:0]  op, b2, b3, ra, t;
      logic [15:0] start;
      int          nbytes;
      start  = pc;
      op     = rom[pc];
      b2     = rom[16'(pc + 1)];
      b3     = rom[16'(pc + 2)];
      p1_written = 0;
      nbytes = 1;
      cycles = 1;
      if (iram[8'hD0][4:3] != 2'b00 && op[3]) events[EV_BANK_NONZERO]++;
      ra = rn_addr(op[2:0]);
      if (op[3]) begin
        case (op[7:4])
          4'h0: wr(ra, iram[ra] + 8'd1);
          4'h1: wr(ra, iram[ra] - 8'd1);
          4'h2: add(iram[ra], 1'b0);
          4'h3: begin if (cy()) events[EV_CARRY_IN]++; add(iram[ra], cy()); end
          4'h4: iram[8'hE0] = acc() | iram[ra];
          4'h5: iram[8'hE0] = acc() & iram[ra];
          4'h6: iram[8'hE0] = acc() ^ iram[ra];
          4'h7: begin nbytes = 2; wr(ra, b2); end
          4'h8: begin nbytes = 2; cycles = 2; wr(b2, iram[ra]); end
          4'h9: begin if (cy()) events[EV_CARRY_IN]++; subb(iram[ra]); end
          4'hA: begin nbytes = 2; cycles = 2; wr(ra, rd(b2)); end
          4'hB: begin
            nbytes = 3; cycles = 2;
            set_cy(iram[ra] < b2);
            if (iram[ra] != b2) events[EV_CJNE_TAKEN]++; else events[EV_CJNE_FALL]++;
          end
          4'hC: begin t = acc(); iram[8'hE0] = iram[ra]; wr(ra, t); events[EV_XCH]++; end
          4'hD: begin
            nbytes = 2; cycles = 2; wr(ra, iram[ra] - 8'd1);
            if (iram[ra] != 0) events[EV_DJNZ_TAKEN]++; else events[EV_DJNZ_FALL]++;
          end
          4'hE: iram[8'hE0] = iram[ra];
          default: wr(ra, acc());
        endcase
      end else begin
        case (op)
          8'h74: begin nbytes = 2; iram[8'hE0] = b2; end
          8'h24: begin nbytes = 2; add(b2, 1'b0); end
          8'hF5: begin nbytes = 2; wr(b2, acc()); end
          8'h02: begin nbytes = 3; cycles = 2; events[EV_LJMP]++; end
          8'hC3: begin set_cy(1'b0); events[EV_SETB_CLR]++; end
          8'hD3: begin set_cy(1'b1); events[EV_SETB_CLR]++; end
          default: ;
        endcase
      end
      // bus prediction
      fetch[0] = start;
      fetch[1] = start + 16'd1;
      if (nbytes == 1) events[EV_DISCARD]++;
      nfetch = 2 * cycles;
      if (cycles == 2) begin
        events[EV_TWO_CYCLE]++;
        fetch[2] = start + 16'(nbytes - 1);
        fetch[3] = start + 16'(nbytes - 1);
      end
      // next PC
      pc = start + 16'(nbytes);
      if (op == 8'h02) pc = {b2, b3};
      else if (op[7:3] == 5'b11011 && iram[ra] != 0) pc = rel(pc, b2);
      else if (op[7:3] == 5'b10111 && iram[ra] != b2) pc = rel(pc, b3);
    endfunction
  endclass

  // ---------------- program builder ----------------
  class asm51;
    logic [7:0] code [$];
    function void b(logic [7:0] x); code.push_back(x); endfunction
    function int here(); return code.size(); endfunction
    function void ljmp(logic [15:0] a); b(8'h02); b(a[15:8]); b(a[7:0]); endfunction
    function void mov_a_imm(logic [7:0] d); b(8'h74); b(d); endfunction
    function void add_a_imm(logic [7:0] d); b(8'h24); b(d); endfunction
    function void mov_dir_a(logic [7:0] a); b(8'hF5); b(a); endfunction
    function void clr_c(); b(8'hC3); endfunction
    function void setb_c(); b(8'hD3); endfunction
    // register-mode instruction with op = upper nibble, register r
    function void rop(logic [3:0] op, logic [2:0] r); b({op, 1'b1, r}); endfunction
    function void mov_r_imm(logic [2:0] r, logic [7:0] d); rop(4'h7, r); b(d); endfunction
    function void mov_dir_r(logic [7:0] a, logic [2:0] r); rop(4'h8, r); b(a); endfunction
    function void mov_r_dir(logic [2:0] r, logic [7:0] a); rop(4'hA, r); b(a); endfunction
    function void djnz(logic [2:0] r, logic [7:0] rl); rop(4'hD, r); b(rl); endfunction
    function void cjne(logic [2:0] r, logic [7:0] d, logic [7:0] rl);
      rop(4'hB, r); b(d); b(rl);
    endfunction
    function void org(int a); while (code.size() < a) b(8'h00); endfunction
    // endless loop on itself
    function void halt(); ljmp(16'(code.size())); endfunction
  endclass

endpackage
