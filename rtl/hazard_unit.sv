// hazard_unit: pipeline interlock checked in ID.
//
// With forwarding (FORWARDING = 1) only a load can cause a stall: if the
// instruction in ID/EX is a load whose destination is a source register of
// the instruction in IF/ID, the load's byte arrives at the end of MEM,
// too late for the consumer's EX. The unit then raises stall for one
// cycle: PC and IF/ID hold (re-circulate) and a bubble goes into ID/EX.
// The rs source is checked for every instruction that reads rs and the rt
// source for R-type, as in the original interlock table; this design also
// checks rt for sb and beq/bne, which read rt in EX.
// With FORWARDING = 0 (the pipeline without forwarding), any register
// writer in ID/EX or EX/MEM whose destination is a source in IF/ID stalls
// the consumer; the write in WB reaches ID through the falling-edge
// register file. Register $0 never causes a stall.
// Purely combinational.
module hazard_unit #(
  parameter bit FORWARDING = 1'b1
) (
  input  logic [4:0] ifid_rs,
  input  logic [4:0] ifid_rt,
  input  logic       ifid_uses_rs,
  input  logic       ifid_uses_rt,
  input  logic       idex_reg_write,
  input  logic       idex_mem_read,
  input  logic [4:0] idex_dst,
  input  logic       exmem_reg_write,
  input  logic [4:0] exmem_dst,
  output logic       stall
);
  function automatic logic reads(input logic [4:0] r);
    return (r != 5'd0) &&
           ((ifid_uses_rs && ifid_rs == r) || (ifid_uses_rt && ifid_rt == r));
  endfunction

  always_comb begin
    if (FORWARDING)
      stall = idex_mem_read && idex_reg_write && reads(idex_dst);
    else
      stall = (idex_reg_write && reads(idex_dst)) ||
              (exmem_reg_write && reads(exmem_dst));
  end
endmodule
