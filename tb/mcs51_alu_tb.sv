// Self-checking test of the ALU: every operation on random and corner
// operands (00h, 7Fh, 80h, FFh, 0Fh, 10h) with carry in 0 and 1, compared
// with results computed here in integer arithmetic.
module mcs51_alu_tb;
  import mcs51_pkg::*;

  alu_op_e    op;
  logic [7:0] a, b, result;
  logic       cy_in, cy_out, ac_out, ov_out, cy_we, acov_we, zero, equal;

  mcs51_alu dut (.*);

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

  function automatic int sgn(logic [7:0] x); return x[7] ? int'(x) - 256 : int'(x); endfunction

  task automatic one(alu_op_e o, logic [7:0] x, logic [7:0] y, logic c);
    int r, s, n, ci;
    logic [7:0] er;
    logic ecy, eac, eov, flags;
    op = o; a = x; b = y; cy_in = c;
    #1;
    ci = (o == ALU_ADDC || o == ALU_SUBB) ? int'(c) : 0;
    ecy = c; eac = 0; eov = 0; flags = 0;
    case (o)
      ALU_PASS_A: er = x;
      ALU_PASS_B: er = y;
      ALU_ADD, ALU_ADDC: begin
        r = int'(y) + int'(x) + ci;       er = 8'(r);
        n = int'(y % 16) + int'(x % 16) + ci;
        s = sgn(y) + sgn(x) + ci;
        ecy = r > 255; eac = n > 15; eov = (s > 127) || (s < -128); flags = 1;
      end
      ALU_SUBB: begin
        r = int'(y) - int'(x) - ci;       er = 8'(r);
        n = int'(y % 16) - int'(x % 16) - ci;
        s = sgn(y) - sgn(x) - ci;
        ecy = r < 0; eac = n < 0; eov = (s > 127) || (s < -128); flags = 1;
      end
      ALU_ORL: er = x | y;
      ALU_ANL: er = x & y;
      ALU_XRL: er = x ^ y;
      ALU_INC: er = 8'(int'(x) + 1);
      ALU_DEC: er = 8'(int'(x) - 1);
      default: begin er = x; ecy = x < y; end   // ALU_CMP
    endcase
    check(result == er, $sformatf("%s %h,%h,%b result %h expected %h", o.name(), x, y, c, result, er));
    check(zero == (er == 0) && equal == (x == y), $sformatf("%s zero/equal", o.name()));
    if (o == ALU_CMP) check(cy_we && !acov_we && cy_out == ecy, $sformatf("CMP %h,%h cy", x, y));
    else if (flags)
      check(cy_we && acov_we && cy_out == ecy && ac_out == eac && ov_out == eov,
            $sformatf("%s %h,%h,%b flags %b%b%b expected %b%b%b", o.name(), x, y, c,
                      cy_out, ac_out, ov_out, ecy, eac, eov));
    else check(!cy_we && !acov_we, $sformatf("%s leaves flags", o.name()));
  endtask

  initial begin
    logic [7:0] corner [6] = '{8'h00, 8'h7F, 8'h80, 8'hFF, 8'h0F, 8'h10};
    for (int o = 0; o <= int'(ALU_CMP); o++) begin
      foreach (corner[i]) foreach (corner[j]) for (int c = 0; c < 2; c++)
        one(alu_op_e'(o), corner[i], corner[j], 1'(c));
      repeat (300) one(alu_op_e'(o), 8'($urandom), 8'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
