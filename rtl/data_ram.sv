// Internal data RAM of the 8031: the lower 128 bytes of the internal data
// space (addresses 00h-7Fh).
//
// 00h-1Fh hold the four register banks R0..R7, 20h-2Fh the bit-addressable
// segment, 30h-7Fh the scratch pad; to this memory they are all plain bytes.
// One asynchronous read port and one synchronous write port.  The contents
// are cleared by reset so that simulation starts from known values; the real
// part leaves them undefined at power-up, so that clearing is this design's
// choice.
//
// Interface: raddr/rdata combinational read; we/waddr/wdata written at the
// rising clock edge.  DEPTH is the 128 bytes of the 8031.
module data_ram #(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= 8'h00;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];

endmodule
