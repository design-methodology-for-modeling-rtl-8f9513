// Timing and control sequencer of the 8031 core.
//
// Steps through the twelve oscillator periods T1..T12 of a machine cycle,
// one per clock, and through one or two machine cycles (M1, M2) per
// instruction.  From the T state it produces the external program-memory
// strobes with the relative timing of the MCS-51 data book:
//
//   T      1  2  3  4  5  6  7  8  9 10 11 12
//   ALE    0  1  1  0  0  0  0  1  1  0  0  0
//   PSENn  0  1  1  1  0  0  0  1  1  1  0  0
//   P0 sampled at the end of T1 and T7 (code byte on the bus)
//
// So each machine cycle makes two code fetches: one addressed in T3..T4 and
// read at the end of T7, one addressed in T9..T10 and read at the end of the
// next T1.  addr_drive marks T3, T4, T9 and T10, when P0 carries the low
// address byte; outside them the core leaves P0 to the memory.
//
// Interface: two_cycle is the decoded length of the instruction in flight,
// read at the end of M1 T12.  Reset (synchronous, active high) parks the
// sequencer at T8 of a second machine cycle, so that the first action after
// reset is the fetch of the opcode at address 0000h; this start-up state is
// this design's choice.
module timing_control
  import mcs51_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    two_cycle,
  output tstate_t tstate,      // 1..12
  output logic    m2,          // 0: machine cycle M1, 1: M2
  output logic    ale,
  output logic    psen_n,
  output logic    addr_drive,
  output logic    sample
);

  always_ff @(posedge clk) begin
    if (rst) begin
      tstate <= 4'd8;
      m2     <= 1'b1;
    end else if (tstate == 4'd12) begin
      tstate <= 4'd1;
      m2     <= !m2 && two_cycle;
    end else begin
      tstate <= tstate + 4'd1;
    end
  end

  always_comb begin
    unique case (tstate)
      4'd2, 4'd3, 4'd8, 4'd9: ale = 1'b1;
      default:                ale = 1'b0;
    endcase
    unique case (tstate)
      4'd2, 4'd3, 4'd4, 4'd8, 4'd9, 4'd10: psen_n = 1'b1;
      default:                             psen_n = 1'b0;
    endcase
    addr_drive = (tstate == 4'd3) || (tstate == 4'd4) ||
                 (tstate == 4'd9) || (tstate == 4'd10);
    sample     = (tstate == 4'd1) || (tstate == 4'd7);
  end

  // the state counter never leaves 1..12
  a_tstate_range: assert property (@(posedge clk) disable iff (rst)
                                   tstate >= 4'd1 && tstate <= 4'd12);

endmodule
