// tb_decoder: checks the decoder on every instruction of the set with
// random register fields and immediates: control bits, destination
// register (rd for R-type, rt for addi/lb, none for sb/beq/bne/j, none
// when the destination is $0), source fields, and the formatted immediate
// (sign-extended, and shifted left by two for branches). Unknown opcodes
// must decode as a no-op.
module tb_decoder;
  import mips_pkg::*;
  import mips_tb_pkg::*;
  logic [31:0] ir, imm;
  ctrl_t       ctrl;
  logic [4:0]  rs, rt, dst;
  int checks = 0, failures = 0;

  decoder dut (.ir, .ctrl, .imm, .rs, .rt, .dst);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: ir=%h %s", ir, what);
    end
  endtask

  initial begin
    repeat (400) begin
      int d, s, t, im, k;
      logic [31:0] sx;
      d = $urandom_range(0, 31); s = $urandom_range(0, 31); t = $urandom_range(0, 31);
      im = $urandom_range(0, 65535) - 32768;
      sx = 32'(im);
      k = $urandom_range(0, 7);
      case (k)
        0: ir = add_(d, s, t);
        1: ir = slt_(d, s, t);
        2: ir = addi_(t, s, im);
        3: ir = lb_(t, im, s);
        4: ir = sb_(t, im, s);
        5: ir = beq_(s, t, im);
        6: ir = bne_(s, t, im);
        default: ir = j_(im & 32'h3ffffff);
      endcase
      #1;
      if (k != 7) chk(rs == 5'(s) && rt == 5'(t), "source fields");
      case (k)
        0, 1: begin
          chk(ctrl.reg_write == (d != 0) && dst == ((d != 0) ? 5'(d) : 5'd0), "R dst");
          chk(ctrl.aluop == 2'b10 && !ctrl.alu_src_b && !ctrl.alu_src_a, "R alu");
          chk(ctrl.uses_rs && ctrl.uses_rt && !ctrl.mem_read && !ctrl.mem_write && !ctrl.branch && !ctrl.jump, "R misc");
        end
        2: begin
          chk(ctrl.reg_write == (t != 0) && dst == ((t != 0) ? 5'(t) : 5'd0), "addi dst");
          chk(ctrl.aluop == 2'b00 && ctrl.alu_src_b && imm == sx, "addi imm");
          chk(ctrl.uses_rs && !ctrl.uses_rt && !ctrl.mem_read && !ctrl.mem_write, "addi misc");
        end
        3: begin
          chk(ctrl.reg_write == (t != 0) && ctrl.mem_read && ctrl.mem_to_reg, "lb ctrl");
          chk(dst == ((t != 0) ? 5'(t) : 5'd0) && imm == sx && ctrl.alu_src_b, "lb dst/imm");
        end
        4: begin
          chk(!ctrl.reg_write && ctrl.mem_write && !ctrl.mem_read && dst == 0, "sb ctrl");
          chk(imm == sx && ctrl.alu_src_b && ctrl.uses_rs && ctrl.uses_rt, "sb imm");
        end
        5, 6: begin
          chk(ctrl.branch && ctrl.branch_ne == (k == 6) && !ctrl.reg_write && !ctrl.mem_write, "branch ctrl");
          chk(imm == (sx << 2) && ctrl.alu_src_a && ctrl.alu_src_b && ctrl.aluop == 2'b00, "branch target operands");
        end
        default: chk(ctrl.jump && !ctrl.reg_write && !ctrl.mem_write && !ctrl.branch, "j ctrl");
      endcase
    end
    ir = 32'hfc000000 | 32'($urandom_range(0, 1 << 20));  // opcode 111111
    #1;
    chk(ctrl == '0, "unknown opcode is a no-op");
    ir = 32'h0;
    #1;
    chk(ctrl.reg_write == 1'b0 && !ctrl.mem_write, "all-zero word is a no-op");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
