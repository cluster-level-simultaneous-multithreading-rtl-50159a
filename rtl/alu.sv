// alu: one integer ALU of a cluster (single-cycle, combinational).
//
// Each cluster has as many ALUs as its issue width. The ALU executes the
// arithmetic, logic, shift and compare operations of the instruction set
// in csmt_pkg; b is the second register operand or the sign-extended
// immediate, already selected by the caller. Compares produce the branch
// register value on cmp; y is the general-register result. The operation
// list is this design's own subset of a VEX-like integer instruction set.
module alu
  import csmt_pkg::*;
(
  input  logic [4:0]  opc,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output logic        cmp
);
  always_comb begin
    y   = '0;
    cmp = 1'b0;
    unique case (opc)
      OP_ADD, OP_ADDI: y = a + b;
      OP_SUB:          y = a - b;
      OP_AND:          y = a & b;
      OP_OR:           y = a | b;
      OP_XOR:          y = a ^ b;
      OP_SHL, OP_SHLI: y = a << b[4:0];
      OP_SHR:          y = a >> b[4:0];
      OP_CMPLT, OP_CMPLTI: cmp = $signed(a) < $signed(b);
      OP_CMPEQ, OP_CMPEQI: cmp = a == b;
      OP_XCP:          y = a;
      default:         y = '0;
    endcase
  end

endmodule
