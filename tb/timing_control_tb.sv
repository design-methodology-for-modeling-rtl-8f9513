// Self-checking test of the T-state sequencer: after reset it must run
// T8..T12 of a second machine cycle, then twelve T states per machine cycle;
// ALE, PSENn, the address-drive window and the sample strobes must follow
// the machine-cycle table in every T state; a one-cycle instruction must
// return to M1 after T12 and a two-cycle one must pass through M2 (24
// clocks).  ALE must pulse twice per machine cycle.
module timing_control_tb;
  import mcs51_pkg::*;

  logic    clk = 0, rst = 1, two_cycle = 0;
  tstate_t tstate;
  logic    m2, ale, psen_n, addr_drive, sample;

  timing_control dut (.*);

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
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  //                     T:  1  2  3  4  5  6  7  8  9 10 11 12
  int ale_t   [12]     = '{0, 1, 1, 0, 0, 0, 0, 1, 1, 0, 0, 0};
  int psen_t  [12]     = '{0, 1, 1, 1, 0, 0, 0, 1, 1, 1, 0, 0};
  int drive_t [12]     = '{0, 0, 1, 1, 0, 0, 0, 0, 1, 1, 0, 0};
  int samp_t  [12]     = '{1, 0, 0, 0, 0, 0, 1, 0, 0, 0, 0, 0};

  initial begin
    int t, mc, ale_rises;
    logic ale_q;
    repeat (3) @(negedge clk);
    rst = 0;
    check(tstate == 8 && m2, "reset state is M2 T8");
    t = 8; mc = 1; ale_rises = 0; ale_q = ale;
    for (int n = 0; n < 2000; n++) begin
      check(int'(tstate) == t && int'(m2) == mc,
            $sformatf("clock %0d: T%0d M%0d, expected T%0d M%0d", n, tstate, m2 + 1, t, mc + 1));
      check(int'(ale) == ale_t[t-1] && int'(psen_n) == psen_t[t-1] &&
            int'(addr_drive) == drive_t[t-1] && int'(sample) == samp_t[t-1],
            $sformatf("strobes in T%0d", t));
      if (ale && !ale_q) ale_rises++;
      ale_q = ale;
      if (t == 12) begin
        mc = (mc == 0 && two_cycle) ? 1 : 0;
        t  = 1;
      end else t++;
      @(negedge clk);
      if (tstate == 1 && !m2) two_cycle = 1'($urandom);
    end
    check(ale_rises >= 2 * (2000 / 12) - 2, $sformatf("ALE pulses: %0d", ale_rises));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
