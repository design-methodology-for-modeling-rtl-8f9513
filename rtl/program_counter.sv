// Program counter, PC incrementer and program address register (PAR).
//
// The PC holds the address of the next code byte to be consumed.  In one
// clock it can be incremented, incremented and moved by a signed 8-bit
// relative offset (DJNZ, CJNE), or loaded with a 16-bit target (LJMP).
// The PAR is a separate copy of the PC, loaded at T2 and T8, that drives the
// address pins while the PC moves on; the split between counter and address
// register follows the block diagram of the 8031.
//
// Interface: synchronous, active-high reset clears PC and PAR to 0000h, the
// reset vector.  jump has priority over inc/rel_add.  All updates take effect
// at the clock edge.
module program_counter (
  input  logic        clk,
  input  logic        rst,
  input  logic        inc,        // PC <= PC + 1 (+ rel when rel_add)
  input  logic        rel_add,    // add sign-extended rel
  input  logic [7:0]  rel,
  input  logic        jump,       // PC <= target
  input  logic [15:0] target,
  input  logic        par_load,   // PAR <= PC
  output logic [15:0] pc,
  output logic [15:0] par
);

  logic [15:0] offset;
  assign offset = rel_add ? {{8{rel[7]}}, rel} : 16'd0;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc  <= 16'h0000;
      par <= 16'h0000;
    end else begin
      if (jump)
        pc <= target;
      else if (inc || rel_add)
        pc <= pc + {15'd0, inc} + offset;
      if (par_load)
        par <= pc;
    end
  end

endmodule
