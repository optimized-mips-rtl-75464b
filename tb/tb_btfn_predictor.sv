// tb_btfn_predictor: checks the static prediction: backward beq/bne
// predicted taken with target NPC + 4*offset, forward ones not taken,
// j always redirected to {NPC[31:28], index, 00}, other instructions not
// redirected; and with BTFN = 0 no branch is predicted taken.
module tb_btfn_predictor;
  import mips_tb_pkg::*;
  logic [31:0] instr, npc, target, target0;
  logic redirect, pred_taken, redirect0, pred_taken0;
  int checks = 0, failures = 0;

  btfn_predictor #(.BTFN(1'b1)) dut (.instr, .npc, .redirect, .pred_taken, .target);
  btfn_predictor #(.BTFN(1'b0)) dut0 (.instr, .npc, .redirect(redirect0),
                                      .pred_taken(pred_taken0), .target(target0));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s instr=%h npc=%h", what, instr, npc); end
  endtask

  initial begin
    repeat (2000) begin
      int off, k;
      off = $urandom_range(0, 1000) - 500;
      npc = {30'($urandom), 2'b00};
      k = $urandom_range(0, 3);
      case (k)
        0: instr = beq_($urandom_range(0, 31), $urandom_range(0, 31), off);
        1: instr = bne_($urandom_range(0, 31), $urandom_range(0, 31), off);
        2: instr = j_(off & 32'h3ffffff);
        default: instr = addi_(1, 2, off);
      endcase
      #1;
      case (k)
        0, 1: begin
          chk(pred_taken == (off < 0) && redirect == (off < 0), "BTFN direction");
          if (off < 0) chk(target == npc + 32'(off * 4), "branch target");
          chk(!pred_taken0 && !redirect0, "no prediction when disabled");
        end
        2: begin
          chk(redirect && !pred_taken, "j redirect");
          chk(target == {npc[31:28], instr[25:0], 2'b00}, "j target");
          chk(redirect0 && target0 == target, "j redirect without BTFN");
        end
        default: chk(!redirect && !pred_taken && !redirect0, "no redirect");
      endcase
    end
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
