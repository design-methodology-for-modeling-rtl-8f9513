// 64-Kbit (8K x 8) UV EPROM, function of the NMC26C64, holding the 8031's
// program in the minimum system.
//
// Read: with ce_n and oe_n both low the byte at address a is driven on d and
// d_oe is high; otherwise d_oe is low (the real part floats its outputs).
// The read path is combinational, like the asynchronous part.  An erased
// EPROM reads FFh; the array starts erased.
//
// Programming: the real part is programmed off-line with a high supply on
// VPP and a PGM pulse.  Here that is reduced to a synchronous write port
// (pgm_we, pgm_addr, pgm_data on the rising edge of pgm_clk) that stores the
// byte as given, used to load a program before the processor is released
// from reset.  This port is the design's stand-in for the programmer (and
// for erasing), not a pin of the part.
module eprom_26c64 #(
  parameter int unsigned ADDR_W = 13            // 8K bytes = 64 Kbit
) (
  input  logic              ce_n,
  input  logic              oe_n,
  input  logic [ADDR_W-1:0] a,
  output logic [7:0]        d,
  output logic              d_oe,
  input  logic              pgm_clk,
  input  logic              pgm_we,
  input  logic [ADDR_W-1:0] pgm_addr,
  input  logic [7:0]        pgm_data
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [7:0] mem [DEPTH];

  initial begin
    for (int unsigned i = 0; i < DEPTH; i++) mem[i] = 8'hFF;
  end

  always @(posedge pgm_clk) begin
    if (pgm_we) mem[pgm_addr] <= pgm_data;
  end

  assign d_oe = !ce_n && !oe_n;
  assign d    = mem[a];

endmodule
