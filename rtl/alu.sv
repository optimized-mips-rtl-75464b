// alu: 32-bit integer ALU of the EX stage.
//
// Performs the five operations of the instruction set, chosen by the 3-bit
// alucontrol code: AND (000), OR (001), ADD (010), SUB (110) and SLT (111,
// signed set-less-than giving 1 or 0). The same adder serves ADD, SUB and
// SLT: SUB and SLT add the two's complement of B. The code values follow
// the ALU control table of the design; the unused codes give zero.
// Purely combinational: y is valid in the same cycle as a, b and op.
module alu
  import mips_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_ctrl_e   op,
  output logic [31:0] y
);
  logic        sub;
  logic [31:0] sum;
  logic        lt;

  assign sub = (op == ALU_SUB) || (op == ALU_SLT);
  assign sum = a + (sub ? ~b : b) + {31'd0, sub};
  // Signed a < b: sign of the difference, corrected on overflow.
  assign lt  = (a[31] != b[31]) ? a[31] : sum[31];

  always_comb begin
    unique case (op)
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_ADD: y = sum;
      ALU_SUB: y = sum;
      ALU_SLT: y = {31'd0, lt};
      default: y = '0;
    endcase
  end
endmodule
