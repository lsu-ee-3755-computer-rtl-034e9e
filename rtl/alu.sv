// alu: 32-bit ALU for the MIPS subset.
//
// Performs the five operations of the 3-bit ALU_OP code: 000 AND, 001 OR,
// 010 SLT, 011 ADD, 100 SUB. SLT compares the operands as signed numbers and
// returns 1 or 0. The zero output is 1 when the result is all zeros; the
// branch logic uses it after a SUB. Codes 101-111 are undefined in the
// operation table and give 0 here, and overflow is not detected: both are
// this design's choices. Purely combinational.
module alu
  import mips_pkg::*;
#(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  alu_op_e      op,
  output logic [W-1:0] y,
  output logic         zero
);
  always_comb begin
    unique case (op)
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_SLT: y = W'($signed(a) < $signed(b));
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      default: y = '0;
    endcase
  end
  assign zero = (y == '0);
endmodule
