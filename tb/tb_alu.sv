// tb_alu: checks the ALU against arithmetic written directly in the test
// bench for all five operations, on corner values (0, 1, -1, the most
// positive and most negative numbers) and on random operands.
module tb_alu;
  import mips_pkg::*;
  logic [31:0] a, b, y;
  alu_ctrl_e   op;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .op, .y);

  function automatic logic [31:0] model(logic [31:0] x, logic [31:0] z, alu_ctrl_e o);
    case (o)
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_ADD: return x + z;
      ALU_SUB: return x - z;
      ALU_SLT: return ($signed(x) < $signed(z)) ? 32'd1 : 32'd0;
      default: return '0;
    endcase
  endfunction

  task automatic try(logic [31:0] x, logic [31:0] z, alu_ctrl_e o);
    a = x; b = z; op = o;
    #1;
    checks++;
    if (y !== model(x, z, o)) begin
      failures++;
      $display("FAIL: op %s a=%h b=%h y=%h", o.name(), x, z, y);
    end
  endtask

  initial begin : main
    static logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hffffffff, 32'h7fffffff, 32'h80000000, 32'h12345678};
    static alu_ctrl_e ops [5] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_SUB, ALU_SLT};
    foreach (ops[k]) foreach (corner[i]) foreach (corner[j]) try(corner[i], corner[j], ops[k]);
    repeat (2000) try($urandom, $urandom, ops[$urandom_range(0, 4)]);
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
