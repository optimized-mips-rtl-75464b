// tb_hazard_unit: checks the load interlock (forwarding configuration):
// a stall exactly when the instruction in ID/EX is a load writing a
// register other than $0 that the instruction in IF/ID reads as rs or rt.
// A second instance without forwarding must stall on any register writer
// in ID/EX or EX/MEM that the instruction in IF/ID reads.
module tb_hazard_unit;
  logic [4:0] ifid_rs, ifid_rt, idex_dst, exmem_dst;
  logic ifid_uses_rs, ifid_uses_rt, idex_reg_write, idex_mem_read, exmem_reg_write;
  logic stall, stall_nf;
  int checks = 0, failures = 0, stalls = 0;

  hazard_unit #(.FORWARDING(1'b1)) dut (.*);
  hazard_unit #(.FORWARDING(1'b0)) dut_nf (.ifid_rs, .ifid_rt, .ifid_uses_rs, .ifid_uses_rt,
    .idex_reg_write, .idex_mem_read, .idex_dst, .exmem_reg_write, .exmem_dst, .stall(stall_nf));

  function automatic bit rd(logic [4:0] r);
    return r != 0 && ((ifid_uses_rs && ifid_rs == r) || (ifid_uses_rt && ifid_rt == r));
  endfunction

  initial begin
    repeat (3000) begin
      ifid_rs = 5'($urandom_range(0, 3)); ifid_rt = 5'($urandom_range(0, 3));
      idex_dst = 5'($urandom_range(0, 3)); exmem_dst = 5'($urandom_range(0, 3));
      {ifid_uses_rs, ifid_uses_rt, idex_reg_write, idex_mem_read, exmem_reg_write} = 5'($urandom);
      #1;
      checks += 2;
      if (stall !== (idex_mem_read && idex_reg_write && rd(idex_dst))) begin
        failures++; $display("FAIL: interlock");
      end
      if (stall_nf !== ((idex_reg_write && rd(idex_dst)) || (exmem_reg_write && rd(exmem_dst)))) begin
        failures++; $display("FAIL: interlock without forwarding");
      end
      stalls += int'(stall);
    end
    checks++;
    if (stalls == 0) failures++;
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
