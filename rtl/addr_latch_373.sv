// Octal transparent D latch, function of the 74LS373, used to hold the low
// address byte A0-A7 that the 8031 puts on its multiplexed port 0.
//
// While le (connected to ALE) is high the outputs follow d; when le falls
// the last value is held.  oe_n low enables the outputs; with oe_n high the
// outputs read as all ones here, standing in for the real part's
// high-impedance state, since the design is simulated with two-valued logic.
//
// This module is a level-sensitive latch on purpose: that is the part it
// models, and the latch warning a synthesis tool gives for it is expected.
module addr_latch_373 (
  input  logic       le,
  input  logic       oe_n,
  input  logic [7:0] d,
  output logic [7:0] q
);

  logic [7:0] held;

  always_latch begin
    if (le) held <= d;
  end

  assign q = oe_n ? 8'hFF : held;

endmodule
