// Self-checking test of the 128-byte internal data RAM: cleared by reset,
// then random writes and reads compared with a model array, with a write and
// a read of the same address in one clock returning the old value until the
// clock edge.
module data_ram_tb;
  logic       clk = 0, rst = 1, we = 0;
  logic [6:0] raddr = 0, waddr = 0;
  logic [7:0] wdata = 0, rdata;

  data_ram dut (.*);

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
    logic [7:0] model [128];
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 128; i++) begin
      model[i] = 0;
      raddr = 7'(i); #1;
      check(rdata == 0, $sformatf("address %h cleared", i));
    end
    for (int n = 0; n < 5000; n++) begin
      we = 1'($urandom); waddr = 7'($urandom); wdata = 8'($urandom);
      raddr = ($urandom_range(0, 3) == 0) ? waddr : 7'($urandom);
      #1;
      check(rdata == model[raddr], $sformatf("read %h: %h expected %h", raddr, rdata, model[raddr]));
      @(negedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
