// Arithmetic/logic unit of the 8031 core.
//
// Combinational.  Operand a is the value latched in Tmp1 (the register or
// immediate operand), operand b the value latched in Tmp2 (normally a copy
// of the accumulator, the immediate byte for CJNE).  The operations are the
// accumulator operations of the implemented instruction set: ADD, ADDC,
// SUBB, ORL, ANL, XRL, INC, DEC, pass-through and the CJNE compare.
//
// Flags follow the MCS-51 rules: ADD/ADDC/SUBB set CY, AC (carry/borrow out
// of bit 3) and OV (signed overflow); CJNE sets CY when a < b unsigned; the
// other operations leave the flags alone (cy_we/acov_we low).  zero and
// equal serve DJNZ and CJNE.
module mcs51_alu
  import mcs51_pkg::*;
(
  input  alu_op_e    op,
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cy_in,
  output logic [7:0] result,
  output logic       cy_out,
  output logic       ac_out,
  output logic       ov_out,
  output logic       cy_we,
  output logic       acov_we,
  output logic       zero,
  output logic       equal
);

  logic [8:0] sum;
  logic [4:0] nib;
  logic       cin;

  always_comb begin
    result  = a;
    cy_out  = cy_in;
    ac_out  = 1'b0;
    ov_out  = 1'b0;
    cy_we   = 1'b0;
    acov_we = 1'b0;
    sum     = '0;
    nib     = '0;
    cin     = (op == ALU_ADDC || op == ALU_SUBB) ? cy_in : 1'b0;
    unique case (op)
      ALU_PASS_A: result = a;
      ALU_PASS_B: result = b;
      ALU_ADD, ALU_ADDC: begin
        // accumulator (b) plus operand (a) plus carry
        sum     = {1'b0, b} + {1'b0, a} + {8'd0, cin};
        nib     = {1'b0, b[3:0]} + {1'b0, a[3:0]} + {4'd0, cin};
        result  = sum[7:0];
        cy_out  = sum[8];
        ac_out  = nib[4];
        ov_out  = (b[7] == a[7]) && (sum[7] != b[7]);
        cy_we   = 1'b1;
        acov_we = 1'b1;
      end
      ALU_SUBB: begin
        // accumulator (b) minus operand (a) minus borrow
        sum     = {1'b0, b} - {1'b0, a} - {8'd0, cin};
        nib     = {1'b0, b[3:0]} - {1'b0, a[3:0]} - {4'd0, cin};
        result  = sum[7:0];
        cy_out  = sum[8];
        ac_out  = nib[4];
        ov_out  = (b[7] != a[7]) && (sum[7] != b[7]);
        cy_we   = 1'b1;
        acov_we = 1'b1;
      end
      ALU_ORL: result = a | b;
      ALU_ANL: result = a & b;
      ALU_XRL: result = a ^ b;
      ALU_INC: result = a + 8'd1;
      ALU_DEC: result = a - 8'd1;
      ALU_CMP: begin
        result = a;
        cy_out = (a < b);
        cy_we  = 1'b1;
      end
      default: result = a;
    endcase
  end

  assign zero  = (result == 8'd0);
  assign equal = (a == b);

endmodule
