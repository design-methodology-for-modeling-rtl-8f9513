// Self-checking test of the SFR space: reset values of the named SFRs
// (SP = 07h, P0..P3 = FFh, the others 00h), generic writes and reads over
// 80h-FFh, the private accumulator and flag ports (which win over a
// generic write to the same byte), the parity bit of PSW, and the port
// latch outputs.
module sfr_file_tb;
  import mcs51_pkg::*;

  logic       clk = 0, rst = 1, we = 0, acc_we = 0, cy_we = 0, cy_d = 0;
  logic       acov_we = 0, ac_d = 0, ov_d = 0;
  logic [6:0] raddr = 0, waddr = 0;
  logic [7:0] wdata = 0, acc_d = 0, rdata, acc, psw;
  logic [7:0] p0_latch, p1_latch, p2_latch, p3_latch;

  sfr_file dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] rdval(logic [7:0] m [128], logic [6:0] a);
    if (a == 7'h50) return {m[a][7:1], ^m[7'h60]};
    return m[a];
  endfunction

  initial begin
    logic [7:0] model [128];
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 128; i++) begin
      case (i + 128)
        'h81:                   model[i] = 8'h07;
        'h80, 'h90, 'hA0, 'hB0: model[i] = 8'hFF;
        default:                model[i] = 8'h00;
      endcase
      raddr = 7'(i); #1;
      check(rdata == model[i], $sformatf("reset value of %h: %h", i + 128, rdata));
    end
    check(p0_latch == 8'hFF && p1_latch == 8'hFF && p2_latch == 8'hFF && p3_latch == 8'hFF,
          "port latches reset to FFh");
    for (int n = 0; n < 5000; n++) begin
      we = 1'($urandom); acc_we = ($urandom_range(0, 3) == 0);
      cy_we = ($urandom_range(0, 3) == 0); acov_we = ($urandom_range(0, 3) == 0);
      waddr = ($urandom_range(0, 3) == 0) ? 7'h50 : (($urandom_range(0, 3) == 0) ? 7'h60 : 7'($urandom));
      wdata = 8'($urandom); acc_d = 8'($urandom);
      cy_d = 1'($urandom); ac_d = 1'($urandom); ov_d = 1'($urandom);
      raddr = 7'($urandom);
      #1;
      check(rdata == rdval(model, raddr), $sformatf("read %h", raddr + 128));
      check(acc == model[7'h60] && psw == rdval(model, 7'h50), "ACC/PSW outputs");
      check(p1_latch == model[7'h10] && p3_latch == model[7'h30], "port latch outputs");
      @(negedge clk);
      if (we)      model[waddr] = wdata;
      if (acc_we)  model[7'h60] = acc_d;
      if (cy_we)   model[7'h50][7] = cy_d;
      if (acov_we) begin model[7'h50][6] = ac_d; model[7'h50][2] = ov_d; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
