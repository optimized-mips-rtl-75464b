// decoder: instruction decode of the ID stage.
//
// From the 32-bit instruction word it produces, in one combinational step,
//  - the control word that travels down the pipe (register write, memory
//    read/write, write-back source, ALU operand sources, aluop, branch,
//    jump, and which source registers the instruction reads),
//  - the formatted immediate: the sign-extended low half-word, shifted left
//    by two for beq/bne so that the ALU can form NPC + (Imm << 2),
//  - the destination register: rd (bits 15:11) for R-type, rt (bits 20:16)
//    for addi and lb, and 0 for instructions that write no register,
//  - the source register fields rs (25:21) and rt (20:16).
// Fields, opcodes and the R/I/J formats are standard MIPS32. An opcode
// outside the instruction set decodes as a no-op (this design's choice).
module decoder
  import mips_pkg::*;
(
  input  logic [31:0] ir,
  output ctrl_t       ctrl,
  output logic [31:0] imm,
  output logic [4:0]  rs,
  output logic [4:0]  rt,
  output logic [4:0]  dst
);
  logic [5:0]  op;
  logic [4:0]  rd;
  logic [31:0] sext;

  assign op   = ir[31:26];
  assign rs   = ir[25:21];
  assign rt   = ir[20:16];
  assign rd   = ir[15:11];
  assign sext = {{16{ir[15]}}, ir[15:0]};

  always_comb begin
    ctrl = '0;
    dst  = '0;
    imm  = sext;
    case (op)
      OP_RTYPE: begin
        ctrl.reg_write = 1'b1;
        ctrl.aluop     = ALUOP_FUNCT;
        ctrl.uses_rs   = 1'b1;
        ctrl.uses_rt   = 1'b1;
        dst            = rd;
      end
      OP_ADDI: begin
        ctrl.reg_write = 1'b1;
        ctrl.alu_src_b = 1'b1;
        ctrl.aluop     = ALUOP_ADD;
        ctrl.uses_rs   = 1'b1;
        dst            = rt;
      end
      OP_LB: begin
        ctrl.reg_write  = 1'b1;
        ctrl.mem_read   = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.alu_src_b  = 1'b1;
        ctrl.aluop      = ALUOP_ADD;
        ctrl.uses_rs    = 1'b1;
        dst             = rt;
      end
      OP_SB: begin
        ctrl.mem_write = 1'b1;
        ctrl.alu_src_b = 1'b1;
        ctrl.aluop     = ALUOP_ADD;
        ctrl.uses_rs   = 1'b1;
        ctrl.uses_rt   = 1'b1;
      end
      OP_BEQ, OP_BNE: begin
        ctrl.branch    = 1'b1;
        ctrl.branch_ne = (op == OP_BNE);
        ctrl.alu_src_a = 1'b1;
        ctrl.alu_src_b = 1'b1;
        ctrl.aluop     = ALUOP_ADD;
        ctrl.uses_rs   = 1'b1;
        ctrl.uses_rt   = 1'b1;
        imm            = {sext[29:0], 2'b00};
      end
      OP_J: begin
        ctrl.jump = 1'b1;
      end
      default: ;
    endcase
    // R-type with rd = 0 (including the all-zero word) writes nothing.
    if (dst == '0) ctrl.reg_write = 1'b0;
  end
endmodule
