// tb_forwarding_unit: checks the operand-source selection against the
// forwarding rules: EX/MEM before MEM/WB, no forwarding from $0, from a
// non-writing producer, from a load in EX/MEM, or to an operand the
// instruction does not read. Random combinations, with register numbers
// drawn from a small set so that matches are frequent.
module tb_forwarding_unit;
  import mips_pkg::*;
  logic [4:0] idex_rs, idex_rt, exmem_dst, memwb_dst;
  logic idex_uses_rs, idex_uses_rt, exmem_reg_write, exmem_mem_read, memwb_reg_write;
  fwd_sel_e fwd_a, fwd_b;
  int checks = 0, failures = 0;
  int seen [3];

  forwarding_unit dut (.*);

  function automatic fwd_sel_e model(logic [4:0] src, logic used);
    if (!used || src == 0) return FWD_NONE;
    if (exmem_reg_write && !exmem_mem_read && exmem_dst == src) return FWD_EXMEM;
    if (memwb_reg_write && memwb_dst == src) return FWD_MEMWB;
    return FWD_NONE;
  endfunction

  initial begin
    seen = '{0, 0, 0};
    repeat (3000) begin
      idex_rs = 5'($urandom_range(0, 3)); idex_rt = 5'($urandom_range(0, 3));
      exmem_dst = 5'($urandom_range(0, 3)); memwb_dst = 5'($urandom_range(0, 3));
      {idex_uses_rs, idex_uses_rt, exmem_reg_write, exmem_mem_read, memwb_reg_write} = 5'($urandom);
      #1;
      checks += 2;
      if (fwd_a !== model(idex_rs, idex_uses_rs)) begin failures++; $display("FAIL: fwd_a"); end
      if (fwd_b !== model(idex_rt, idex_uses_rt)) begin failures++; $display("FAIL: fwd_b"); end
      seen[fwd_a]++;
    end
    checks++;
    if (seen[FWD_EXMEM] == 0 || seen[FWD_MEMWB] == 0) failures++;
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
