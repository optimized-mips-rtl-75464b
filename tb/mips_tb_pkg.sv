// mips_tb_pkg: test-bench helpers for the pipelined MIPS.
//
// An assembler (functions returning 32-bit MIPS32 instruction words) and
// an instruction-level reference model (class mips_iss) that executes one
// instruction per call of step() and reports the register and memory
// update it makes. The reference model knows nothing of the pipeline, so
// comparing the core's retired instructions against it checks forwarding,
// interlocks and branch recovery independently of the RTL.
package mips_tb_pkg;

  function automatic logic [31:0] r_op(input logic [5:0] fn, input int rd, input int rs, input int rt);
    return {6'b000000, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] add_(input int rd, input int rs, input int rt); return r_op(6'b100000, rd, rs, rt); endfunction
  function automatic logic [31:0] sub_(input int rd, input int rs, input int rt); return r_op(6'b100010, rd, rs, rt); endfunction
  function automatic logic [31:0] and_(input int rd, input int rs, input int rt); return r_op(6'b100100, rd, rs, rt); endfunction
  function automatic logic [31:0] or_ (input int rd, input int rs, input int rt); return r_op(6'b100101, rd, rs, rt); endfunction
  function automatic logic [31:0] slt_(input int rd, input int rs, input int rt); return r_op(6'b101010, rd, rs, rt); endfunction
  function automatic logic [31:0] i_op(input logic [5:0] op, input int rt, input int rs, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] addi_(input int rt, input int rs, input int imm); return i_op(6'b001000, rt, rs, imm); endfunction
  function automatic logic [31:0] lb_  (input int rt, input int imm, input int rs);  return i_op(6'b100000, rt, rs, imm); endfunction
  function automatic logic [31:0] sb_  (input int rt, input int imm, input int rs);  return i_op(6'b101000, rt, rs, imm); endfunction
  // Branch offsets are in instructions, relative to the next instruction.
  function automatic logic [31:0] beq_ (input int rs, input int rt, input int off); return i_op(6'b000100, rt, rs, off); endfunction
  function automatic logic [31:0] bne_ (input int rs, input int rt, input int off); return i_op(6'b000101, rt, rs, off); endfunction
  // Jump target is a word address.
  function automatic logic [31:0] j_(input int word); return {6'b000010, 26'(word)}; endfunction

  class mips_iss;
    logic [31:0] regs [32];
    logic [7:0]  mem  [];
    logic [31:0] imem [];
    logic [31:0] pc;
    // effects of the last step
    logic [31:0] last_pc, last_ir;
    bit          wrote_reg;  int unsigned w_dst;  logic [31:0] w_data;
    bit          stored;     logic [31:0] s_addr; logic [7:0]  s_data;

    function new(int unsigned dbytes, int unsigned iwords);
      mem  = new[dbytes];
      imem = new[iwords];
      foreach (regs[i]) regs[i] = '0;
      foreach (mem[i])  mem[i]  = '0;
      foreach (imem[i]) imem[i] = '0;
      pc = '0;
    endfunction

    function void step();
      logic [31:0] ir, a, b, sext, npc;
      logic [5:0]  op;
      int unsigned rs, rt, rd;
      ir = imem[(pc >> 2) % imem.size()];
      last_pc = pc; last_ir = ir;
      wrote_reg = 0; stored = 0;
      op = ir[31:26]; rs = 32'(ir[25:21]); rt = 32'(ir[20:16]); rd = 32'(ir[15:11]);
      a = regs[rs]; b = regs[rt];
      sext = {{16{ir[15]}}, ir[15:0]};
      npc = pc + 4;
      pc = npc;
      case (op)
        6'b000000: begin
          logic [31:0] y;
          case (ir[5:0])
            6'b100000: y = a + b;
            6'b100010: y = a - b;
            6'b100100: y = a & b;
            6'b100101: y = a | b;
            6'b101010: y = ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
            default:   y = a + b;
          endcase
          wr(rd, y);
        end
        6'b001000: wr(rt, a + sext);
        6'b100000: begin
          logic [7:0] v;
          v = mem[(a + sext) % mem.size()];
          wr(rt, {{24{v[7]}}, v});
        end
        6'b101000: begin
          stored = 1; s_addr = (a + sext) % mem.size(); s_data = b[7:0];
          mem[s_addr] = s_data;
        end
        6'b000100: if (a == b) pc = npc + (sext << 2);
        6'b000101: if (a != b) pc = npc + (sext << 2);
        6'b000010: pc = {npc[31:28], ir[25:0], 2'b00};
        default: ;
      endcase
    endfunction

    function void wr(int unsigned r, logic [31:0] v);
      if (r != 0) begin
        regs[r] = v; wrote_reg = 1; w_dst = r; w_data = v;
      end
    endfunction
  endclass

endpackage
