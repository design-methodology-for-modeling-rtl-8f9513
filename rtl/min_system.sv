// Minimum 8031 system: the ROM-less 8031 core, a 74LS373-style address
// latch and an NMC26C64-style 8K x 8 EPROM holding the program.
//
// The 8031 multiplexes the low address byte and the code byte on port 0.
// While ALE is high the latch is transparent and follows port 0; when ALE
// falls it holds the low address A0-A7.  Port 2 gives the high address
// directly (only A8-A12 reach the 8K EPROM).  PSENn enables the EPROM
// outputs onto port 0, where the core samples the code byte.  EA of the
// 8031 is tied low in such a system (all code is external); the core here
// has only that mode, so there is no EA pin.
//
// Port 0 is modelled as a resolved bus: the core's address when it drives,
// else the EPROM when enabled, else all ones (the idle, floating bus reads
// as ones in this two-valued model).  All of this wiring follows the
// minimum-system diagram of the design; the bus resolution and the EPROM
// programming port are this design's own.
//
// Interface: xtal2 clock and synchronous active-high rst of the core.  The
// EPROM is loaded through pgm_we/pgm_addr/pgm_data, clocked by xtal2, while
// rst is held.  P0..P3, ALE and PSENn are brought out as the pins a logic
// analyser would see; mon carries PC, IR, ACC, PSW and the T state.
module min_system
  import mcs51_pkg::*;
#(
  parameter int unsigned ROM_ADDR_W = 13
) (
  input  logic                  xtal2,
  input  logic                  rst,
  input  logic                  pgm_we,
  input  logic [ROM_ADDR_W-1:0] pgm_addr,
  input  logic [7:0]            pgm_data,
  output logic [7:0]            p0,
  output logic [7:0]            p1,
  output logic [7:0]            p2,
  output logic [7:0]            p3,
  output logic                  ale,
  output logic                  psen_n,
  output monitor_t              mon
);

  logic [7:0] cpu_p0_out, rom_d, a_low, p0_addr;
  logic       cpu_p0_oe, rom_oe;

  cpu8031 u_cpu (
    .xtal2, .rst, .p0_in(p0), .p0_out(cpu_p0_out), .p0_oe(cpu_p0_oe),
    .p1_out(p1), .p2_out(p2), .p3_out(p3), .ale, .psen_n, .mon
  );

  // The latch is transparent only while ALE is high, and PSENn is then high,
  // so the only value it can see on port 0 is the core's address.  Taking
  // its input from the core's drive rather than from the resolved bus keeps
  // the EPROM's output out of its own address path (no combinational loop).
  assign p0_addr = cpu_p0_oe ? cpu_p0_out : 8'hFF;

  addr_latch_373 u_latch (.le(ale), .oe_n(1'b0), .d(p0_addr), .q(a_low));

  eprom_26c64 #(.ADDR_W(ROM_ADDR_W)) u_rom (
    .ce_n(1'b0), .oe_n(psen_n), .a({p2[ROM_ADDR_W-9:0], a_low}),
    .d(rom_d), .d_oe(rom_oe),
    .pgm_clk(xtal2), .pgm_we, .pgm_addr, .pgm_data
  );

  assign p0 = cpu_p0_oe ? cpu_p0_out : (rom_oe ? rom_d : 8'hFF);

endmodule
