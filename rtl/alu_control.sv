// alu_control: derives the ALU operation from aluop and the funct field.
//
// aluop 00 selects ADD (address and branch-target arithmetic, addi),
// 01 selects SUB, and 10 decodes the 6-bit funct field of an R-type
// instruction: 100000 ADD, 100010 SUB, 100100 AND, 100101 OR, 101010 SLT.
// The table is the design's; aluop 11 and unknown funct values, which the
// design leaves undefined, are given ADD here.
// Purely combinational.
module alu_control
  import mips_pkg::*;
(
  input  logic [1:0] aluop,
  input  logic [5:0] funct,
  output alu_ctrl_e  alucontrol
);
  always_comb begin
    alucontrol = ALU_ADD;
    case (aluop)
      ALUOP_ADD: alucontrol = ALU_ADD;
      ALUOP_SUB: alucontrol = ALU_SUB;
      ALUOP_FUNCT: begin
        case (funct)
          FN_ADD:  alucontrol = ALU_ADD;
          FN_SUB:  alucontrol = ALU_SUB;
          FN_AND:  alucontrol = ALU_AND;
          FN_OR:   alucontrol = ALU_OR;
          FN_SLT:  alucontrol = ALU_SLT;
          default: alucontrol = ALU_ADD;
        endcase
      end
      default: alucontrol = ALU_ADD;
    endcase
  end
endmodule
