// optimized_mips: the complete processor, pipelined core plus separate
// instruction and data memories (Harvard organisation).
//
// The core fetches one 32-bit instruction per cycle from instr_mem and
// reads or writes one byte per cycle of data_mem, so IF and MEM never
// compete for a memory. Programs are loaded through the prog_* port while
// rst is high; when rst falls the core starts fetching at address 0.
// The debug ports read a register and a data byte without disturbing
// execution; retire_* and ev_* are the core's status outputs (see
// mips_pipeline). Parameter defaults: forwarding and BTFN prediction on,
// 256 instruction words, 1024 data bytes (memory sizes are this design's
// choice). All state changes on the rising edge except the register-file
// write, which uses the falling edge.
module optimized_mips #(
  parameter bit          FORWARDING = 1'b1,
  parameter bit          BTFN       = 1'b1,
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_BYTES = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        prog_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] prog_addr,
  input  logic [31:0] prog_data,
  input  logic [4:0]  dbg_reg_addr,
  output logic [31:0] dbg_reg_data,
  input  logic [31:0] dbg_mem_addr,
  output logic [7:0]  dbg_mem_data,
  output logic        retire_valid,
  output logic [31:0] retire_pc,
  output logic [31:0] retire_ir,
  output logic        retire_we,
  output logic [4:0]  retire_dst,
  output logic [31:0] retire_data,
  output logic        dmem_we,
  output logic [31:0] dmem_addr,
  output logic [7:0]  dmem_wdata,
  output logic        ev_stall,
  output logic        ev_fwd_exmem,
  output logic        ev_fwd_memwb,
  output logic        ev_pred_taken,
  output logic        ev_jump,
  output logic        ev_mispredict
);
  logic [31:0] imem_addr, imem_rdata;
  logic [7:0]  dmem_rdata;

  mips_pipeline #(.FORWARDING(FORWARDING), .BTFN(BTFN)) u_core (
    .clk, .rst,
    .imem_addr, .imem_rdata,
    .dmem_addr, .dmem_rdata, .dmem_we, .dmem_wdata,
    .dbg_reg_addr, .dbg_reg_data,
    .retire_valid, .retire_pc, .retire_ir, .retire_we, .retire_dst, .retire_data,
    .ev_stall, .ev_fwd_exmem, .ev_fwd_memwb, .ev_pred_taken, .ev_jump, .ev_mispredict
  );

  instr_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .addr(imem_addr), .rdata(imem_rdata),
    .we(prog_we), .waddr(prog_addr), .wdata(prog_data)
  );

  data_mem #(.BYTES(DMEM_BYTES)) u_dmem (
    .clk, .rst, .addr(dmem_addr), .rdata(dmem_rdata),
    .we(dmem_we), .wdata(dmem_wdata),
    .dbg_addr(dbg_mem_addr), .dbg_rdata(dbg_mem_data)
  );
endmodule
