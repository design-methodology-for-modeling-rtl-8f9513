// Special function register space of the 8031: direct addresses 80h-FFh.
//
// The whole upper half of the internal data space is kept as 128 bytes, so
// a direct write to any address there reads back (as the reference model of
// the part does; the addresses with no SFR behind them are plain storage
// here).  The named SFRs take the data-book reset values: SP = 07h, the four
// port latches = FFh, everything else 00h (bits the data book leaves
// undefined are cleared).
//
// Besides the generic read and write port used by direct addressing, the
// core has private ports to the accumulator (written by the ALU) and to the
// PSW flags CY, AC and OV.  They are applied after the generic write, so
// they win if both hit the same byte in one clock.  The parity flag P
// (PSW.0) is not stored: it always reads as the even parity of ACC.
//
// Interface: addresses are the low seven bits of the direct address.  Reads
// are combinational, writes happen at the rising clock edge; synchronous
// active-high reset.
module sfr_file
  import mcs51_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [6:0] raddr,
  output logic [7:0] rdata,
  input  logic       we,
  input  logic [6:0] waddr,
  input  logic [7:0] wdata,
  input  logic       acc_we,
  input  logic [7:0] acc_d,
  input  logic       cy_we,
  input  logic       cy_d,
  input  logic       acov_we,
  input  logic       ac_d,
  input  logic       ov_d,
  output logic [7:0] acc,
  output logic [7:0] psw,
  output logic [7:0] p0_latch,
  output logic [7:0] p1_latch,
  output logic [7:0] p2_latch,
  output logic [7:0] p3_latch
);

  logic [7:0] regs [128];

  function automatic logic [7:0] reset_value(int unsigned a);
    unique case (8'(a) | 8'h80)
      SFR_SP:                         return 8'h07;
      SFR_P0, SFR_P1, SFR_P2, SFR_P3: return 8'hFF;
      default:                        return 8'h00;
    endcase
  endfunction

  localparam logic [6:0] A_ACC = SFR_ACC[6:0];
  localparam logic [6:0] A_PSW = SFR_PSW[6:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < 128; i++) regs[i] <= reset_value(i);
    end else begin
      if (we)      regs[waddr] <= wdata;
      if (acc_we)  regs[A_ACC] <= acc_d;
      if (cy_we)   regs[A_PSW][PSW_CY] <= cy_d;
      if (acov_we) begin
        regs[A_PSW][PSW_AC] <= ac_d;
        regs[A_PSW][PSW_OV] <= ov_d;
      end
    end
  end

  assign acc      = regs[A_ACC];
  assign psw      = {regs[A_PSW][7:1], ^regs[A_ACC]};
  assign p0_latch = regs[SFR_P0[6:0]];
  assign p1_latch = regs[SFR_P1[6:0]];
  assign p2_latch = regs[SFR_P2[6:0]];
  assign p3_latch = regs[SFR_P3[6:0]];
  assign rdata    = (raddr == A_PSW) ? psw : regs[raddr];

endmodule
