// Self-checking test of the EPROM: it reads FFh everywhere when erased;
// bytes written through the programming port read back at their address
// whatever else was written; the output-enable flag follows ce_n and oe_n.
module eprom_26c64_tb;
  logic        ce_n = 0, oe_n = 0, pgm_clk = 0, pgm_we = 0, d_oe;
  logic [12:0] a = 0, pgm_addr = 0;
  logic [7:0]  d, pgm_data = 0;

  eprom_26c64 dut (.*);

  always #5 pgm_clk = ~pgm_clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge pgm_clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] model [8192];
    for (int i = 0; i < 8192; i += 37) begin
      a = 13'(i); #1;
      check(d == 8'hFF, "erased byte reads FFh");
    end
    foreach (model[i]) model[i] = 8'hFF;
    @(negedge pgm_clk);
    for (int n = 0; n < 3000; n++) begin
      pgm_we = 1; pgm_addr = 13'($urandom); pgm_data = 8'($urandom);
      model[pgm_addr] = pgm_data;
      @(negedge pgm_clk);
    end
    pgm_we = 0;
    for (int n = 0; n < 3000; n++) begin
      a = 13'($urandom); ce_n = 1'($urandom); oe_n = 1'($urandom);
      #1;
      check(d_oe == (!ce_n && !oe_n), "output enable");
      if (d_oe) check(d == model[a], $sformatf("read %h: %h expected %h", a, d, model[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
