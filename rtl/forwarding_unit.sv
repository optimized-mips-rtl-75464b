// forwarding_unit: selects the source of each ALU operand in EX.
//
// The destination register of the instructions in EX/MEM and MEM/WB is
// compared with the source registers (rs for operand A, rt for operand B)
// of the instruction in ID/EX. On a match with a register-writing producer
// (and a destination other than $0) the forwarded result replaces the
// value read from the register file; EX/MEM, the younger producer, wins
// over MEM/WB. A load in EX/MEM is never forwarded from: its data only
// exists at the end of MEM, and the load interlock keeps its consumer one
// cycle behind, so the value then comes from MEM/WB.
// The comparisons follow the original forwarding table, which forwards to
// operand B only for register-register consumers. This design forwards B
// for every instruction that reads rt (R-type, sb store data, beq/bne
// comparison), since sb and the branches need rt in EX. With FORWARDING = 0 the unit always
// selects the register file, which models the pipeline without
// forwarding; the hazard unit then stalls instead.
// Purely combinational.
module forwarding_unit
  import mips_pkg::*;
#(
  parameter bit FORWARDING = 1'b1
) (
  input  logic [4:0] idex_rs,
  input  logic [4:0] idex_rt,
  input  logic       idex_uses_rs,
  input  logic       idex_uses_rt,
  input  logic       exmem_reg_write,
  input  logic       exmem_mem_read,
  input  logic [4:0] exmem_dst,
  input  logic       memwb_reg_write,
  input  logic [4:0] memwb_dst,
  output fwd_sel_e   fwd_a,
  output fwd_sel_e   fwd_b
);
  function automatic fwd_sel_e pick(input logic [4:0] src, input logic used);
    if (!FORWARDING || !used || src == 5'd0)
      return FWD_NONE;
    else if (exmem_reg_write && !exmem_mem_read && exmem_dst == src)
      return FWD_EXMEM;
    else if (memwb_reg_write && memwb_dst == src)
      return FWD_MEMWB;
    else
      return FWD_NONE;
  endfunction

  assign fwd_a = pick(idex_rs, idex_uses_rs);
  assign fwd_b = pick(idex_rt, idex_uses_rt);
endmodule
