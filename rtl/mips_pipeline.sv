// mips_pipeline: the five-stage pipelined MIPS core (IF, ID, EX, MEM, WB).
//
// IF   The PC addresses the instruction memory; the word arrives in the
//      same cycle. A +4 adder forms NPC. The BTFN predictor looks at the
//      fetched word and redirects fetch for backward branches and for j.
// ID   The decoder and the register-file read work in parallel on the
//      fixed fields of IR. The hazard unit checks for a load-use hazard:
//      on one, PC and IF/ID hold and a bubble (all zeros) enters ID/EX.
// EX   Forwarding muxes pick each ALU operand from the register value,
//      the EX/MEM ALU result or the MEM/WB result. The ALU computes the
//      result, the effective address (A + Imm) or the branch target
//      (NPC + Imm<<2); the comparators produce E, Z and N.
// MEM  lb reads and sb writes the data memory at the ALU address. Branches
//      complete here: the outcome from E is compared with the prediction
//      made in IF, and on a mismatch PC is set to the target or to NPC and
//      the three younger instructions (in IF/ID, ID/EX and EX/MEM) are
//      replaced by bubbles. A misprediction therefore costs 3 cycles.
// WB   The loaded byte or the ALU result is written to the register file
//      on the falling clock edge.
// Timing: one instruction enters per cycle; a load followed by a user of
// its result costs one stall cycle; a correctly predicted branch costs
// nothing; a mispredicted branch costs three.
//
// The stage contents, the pipeline-register fields, forwarding, the load
// interlock, BTFN prediction and branch completion in MEM follow the
// design. Making the prediction in IF, the j redirect in IF, forwarding
// rt also to store data and comparator, and the retire/event outputs
// (used by test benches to observe the pipeline) are this implementation's
// choices. FORWARDING = 0 and BTFN = 0 give the comparison pipelines
// without forwarding or without prediction.
//
// Interface: instruction port (imem_addr/imem_rdata, asynchronous read),
// byte data port (dmem_addr, dmem_rdata, dmem_we, dmem_wdata), a register
// read port for debug, and per-cycle status: retire_* describe the
// instruction in WB, ev_* pulse for one cycle when a mechanism acts.
// Z and N are carried to EX/MEM as in the datapath but no instruction of
// the present set reads them, so a lint tool reports them unused.
module mips_pipeline
  import mips_pkg::*;
#(
  parameter bit FORWARDING = 1'b1,
  parameter bit BTFN       = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  // instruction memory port
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  // data memory port
  output logic [31:0] dmem_addr,
  input  logic [7:0]  dmem_rdata,
  output logic        dmem_we,
  output logic [7:0]  dmem_wdata,
  // debug register read
  input  logic [4:0]  dbg_reg_addr,
  output logic [31:0] dbg_reg_data,
  // instruction in WB
  output logic        retire_valid,
  output logic [31:0] retire_pc,
  output logic [31:0] retire_ir,
  output logic        retire_we,
  output logic [4:0]  retire_dst,
  output logic [31:0] retire_data,
  // mechanism events
  output logic        ev_stall,
  output logic        ev_fwd_exmem,
  output logic        ev_fwd_memwb,
  output logic        ev_pred_taken,
  output logic        ev_jump,
  output logic        ev_mispredict
);
  if_id_t  ifid_d,  ifid_q;
  id_ex_t  idex_d,  idex_q;
  ex_mem_t exmem_d, exmem_q;
  mem_wb_t memwb_d, memwb_q;

  logic        stall, mispredict;
  logic [31:0] redirect_pc;

  // ------------------------------------------------------------------ IF
  logic [31:0] pc, pc_next, npc_f, pred_target;
  logic        pred_redirect, pred_taken;

  assign npc_f     = pc + 32'd4;
  assign imem_addr = pc;

  btfn_predictor #(.BTFN(BTFN)) u_pred (
    .instr(imem_rdata), .npc(npc_f),
    .redirect(pred_redirect), .pred_taken(pred_taken), .target(pred_target)
  );

  always_comb begin
    if (mispredict)         pc_next = redirect_pc;
    else if (stall)         pc_next = pc;
    else if (pred_redirect) pc_next = pred_target;
    else                    pc_next = npc_f;
  end

  always_ff @(posedge clk) begin
    if (rst) pc <= '0;
    else     pc <= pc_next;
  end

  assign ifid_d = '{valid: 1'b1, pc: pc, npc: npc_f, ir: imem_rdata,
                    pred_taken: pred_taken};

  pipe_reg #(.T(if_id_t)) u_ifid (
    .clk, .rst, .en(!stall), .clr(mispredict), .d(ifid_d), .q(ifid_q)
  );

  // ------------------------------------------------------------------ ID
  ctrl_t       ctrl_d;
  logic [31:0] imm_d, rsv_d, rtv_d, wb_result;
  logic [4:0]  rs_d, rt_d, dst_d;

  decoder u_dec (
    .ir(ifid_q.ir), .ctrl(ctrl_d), .imm(imm_d), .rs(rs_d), .rt(rt_d), .dst(dst_d)
  );

  regfile u_rf (
    .clk, .rst,
    .ra1(rs_d), .rd1(rsv_d),
    .ra2(rt_d), .rd2(rtv_d),
    .we(memwb_q.reg_write), .wa(memwb_q.dst), .wd(wb_result),
    .dbg_ra(dbg_reg_addr), .dbg_rd(dbg_reg_data)
  );

  hazard_unit #(.FORWARDING(FORWARDING)) u_haz (
    .ifid_rs(rs_d), .ifid_rt(rt_d),
    .ifid_uses_rs(ctrl_d.uses_rs), .ifid_uses_rt(ctrl_d.uses_rt),
    .idex_reg_write(idex_q.ctrl.reg_write), .idex_mem_read(idex_q.ctrl.mem_read),
    .idex_dst(idex_q.dst),
    .exmem_reg_write(exmem_q.ctrl.reg_write), .exmem_dst(exmem_q.dst),
    .stall(stall)
  );

  assign idex_d = '{valid: ifid_q.valid, pc: ifid_q.pc, npc: ifid_q.npc,
                    ir: ifid_q.ir, pred_taken: ifid_q.pred_taken,
                    ctrl: ctrl_d, rsv: rsv_d, rtv: rtv_d, imm: imm_d,
                    rs: rs_d, rt: rt_d, dst: dst_d};

  pipe_reg #(.T(id_ex_t)) u_idex (
    .clk, .rst, .en(1'b1), .clr(mispredict || stall), .d(idex_d), .q(idex_q)
  );

  // ------------------------------------------------------------------ EX
  fwd_sel_e    fwd_a, fwd_b;
  logic [31:0] a_fwd, b_fwd, alu_a, alu_b, alu_y;
  alu_ctrl_e   alucontrol;
  logic        e_x, z_x, n_x;

  forwarding_unit #(.FORWARDING(FORWARDING)) u_fwd (
    .idex_rs(idex_q.rs), .idex_rt(idex_q.rt),
    .idex_uses_rs(idex_q.ctrl.uses_rs), .idex_uses_rt(idex_q.ctrl.uses_rt),
    .exmem_reg_write(exmem_q.ctrl.reg_write), .exmem_mem_read(exmem_q.ctrl.mem_read),
    .exmem_dst(exmem_q.dst),
    .memwb_reg_write(memwb_q.reg_write), .memwb_dst(memwb_q.dst),
    .fwd_a(fwd_a), .fwd_b(fwd_b)
  );

  always_comb begin
    unique case (fwd_a)
      FWD_EXMEM: a_fwd = exmem_q.alu;
      FWD_MEMWB: a_fwd = wb_result;
      default:   a_fwd = idex_q.rsv;
    endcase
    unique case (fwd_b)
      FWD_EXMEM: b_fwd = exmem_q.alu;
      FWD_MEMWB: b_fwd = wb_result;
      default:   b_fwd = idex_q.rtv;
    endcase
  end

  assign alu_a = idex_q.ctrl.alu_src_a ? idex_q.npc : a_fwd;
  assign alu_b = idex_q.ctrl.alu_src_b ? idex_q.imm : b_fwd;

  alu_control u_aluctl (.aluop(idex_q.ctrl.aluop), .funct(idex_q.ir[5:0]),
                        .alucontrol(alucontrol));
  alu u_alu (.a(alu_a), .b(alu_b), .op(alucontrol), .y(alu_y));
  branch_cond #(.WIDTH(32)) u_cmp (.a(a_fwd), .b(b_fwd), .e(e_x), .z(z_x), .n(n_x));

  assign exmem_d = '{valid: idex_q.valid, pc: idex_q.pc, npc: idex_q.npc,
                     ir: idex_q.ir, pred_taken: idex_q.pred_taken,
                     ctrl: idex_q.ctrl, alu: alu_y, rtv: b_fwd,
                     e: e_x, z: z_x, n: n_x, dst: idex_q.dst};

  pipe_reg #(.T(ex_mem_t)) u_exmem (
    .clk, .rst, .en(1'b1), .clr(mispredict), .d(exmem_d), .q(exmem_q)
  );

  // ----------------------------------------------------------------- MEM
  logic taken;

  assign dmem_addr  = exmem_q.alu;
  assign dmem_we    = exmem_q.ctrl.mem_write;
  assign dmem_wdata = exmem_q.rtv[7:0];

  assign taken       = exmem_q.ctrl.branch && (exmem_q.ctrl.branch_ne ? !exmem_q.e : exmem_q.e);
  assign mispredict  = exmem_q.ctrl.branch && (taken != exmem_q.pred_taken);
  assign redirect_pc = taken ? exmem_q.alu : exmem_q.npc;

  assign memwb_d = '{valid: exmem_q.valid, pc: exmem_q.pc, ir: exmem_q.ir,
                     reg_write: exmem_q.ctrl.reg_write,
                     mem_to_reg: exmem_q.ctrl.mem_to_reg,
                     alu: exmem_q.alu, md: {{24{dmem_rdata[7]}}, dmem_rdata},
                     dst: exmem_q.dst};

  pipe_reg #(.T(mem_wb_t)) u_memwb (
    .clk, .rst, .en(1'b1), .clr(1'b0), .d(memwb_d), .q(memwb_q)
  );

  // ------------------------------------------------------------------ WB
  assign wb_result = memwb_q.mem_to_reg ? memwb_q.md : memwb_q.alu;

  assign retire_valid = memwb_q.valid;
  assign retire_pc    = memwb_q.pc;
  assign retire_ir    = memwb_q.ir;
  assign retire_we    = memwb_q.reg_write;
  assign retire_dst   = memwb_q.dst;
  assign retire_data  = wb_result;

  assign ev_stall      = stall && !mispredict;
  assign ev_fwd_exmem  = (fwd_a == FWD_EXMEM) || (fwd_b == FWD_EXMEM);
  assign ev_fwd_memwb  = (fwd_a == FWD_MEMWB) || (fwd_b == FWD_MEMWB);
  assign ev_pred_taken = pred_taken && !stall && !mispredict;
  assign ev_jump       = pred_redirect && !pred_taken && !stall && !mispredict;
  assign ev_mispredict = mispredict;

  // The load interlock guarantees that a load's consumer is never in EX
  // while the load is in MEM.
  a_load_use_covered : assert property (@(posedge clk) disable iff (rst)
    !(exmem_q.ctrl.mem_read && exmem_q.ctrl.reg_write &&
      ((idex_q.ctrl.uses_rs && idex_q.rs == exmem_q.dst) ||
       (idex_q.ctrl.uses_rt && idex_q.rt == exmem_q.dst))));
endmodule
