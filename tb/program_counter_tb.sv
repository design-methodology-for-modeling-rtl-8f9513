// Self-checking test of the program counter: random sequences of
// increment, relative branch (forward and backward offsets), jump and PAR
// loads, compared with a model kept here; reset must clear PC and PAR.
module program_counter_tb;
  logic        clk = 0, rst = 1, inc = 0, rel_add = 0, jump = 0, par_load = 0;
  logic [7:0]  rel = 0;
  logic [15:0] target = 0, pc, par;

  program_counter dut (.*);

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

  initial begin
    int mpc, mpar;
    repeat (2) @(negedge clk);
    rst = 0;
    check(pc == 0 && par == 0, "reset clears PC and PAR");
    mpc = 0; mpar = 0;
    for (int n = 0; n < 5000; n++) begin
      inc = 1'($urandom); rel_add = ($urandom_range(0, 3) == 0); jump = ($urandom_range(0, 7) == 0);
      par_load = 1'($urandom); rel = 8'($urandom); target = 16'($urandom);
      if (n % 1000 == 10) begin jump = 1; target = 16'hFFFE; end   // wrap-around
      @(negedge clk);
      if (par_load) mpar = mpc;
      if (jump) mpc = target;
      else if (inc || rel_add)
        mpc = (mpc + int'(inc) + (rel_add ? (rel[7] ? int'(rel) - 256 : int'(rel)) : 0)) & 16'hFFFF;
      check(int'(pc) == mpc, $sformatf("PC %h expected %h", pc, mpc));
      check(int'(par) == mpar, $sformatf("PAR %h expected %h", par, mpar));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
