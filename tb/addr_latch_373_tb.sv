// Self-checking test of the transparent address latch: outputs follow the
// inputs while le is high, hold the last value after le falls whatever the
// inputs do, and read FFh while the outputs are disabled.
module addr_latch_373_tb;
  logic       le = 0, oe_n = 0;
  logic [7:0] d = 0, q;

  addr_latch_373 dut (.*);

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
    logic [7:0] held;
    le = 1; d = 8'h00; #1; held = 8'h00;
    for (int n = 0; n < 2000; n++) begin
      le = 1'($urandom); oe_n = ($urandom_range(0, 7) == 0); d = 8'($urandom);
      #1;
      if (le) held = d;
      check(q == (oe_n ? 8'hFF : held), $sformatf("le=%b oe_n=%b d=%h q=%h expected %h",
                                                  le, oe_n, d, q, oe_n ? 8'hFF : held));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
