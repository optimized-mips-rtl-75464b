// tb_mips_pipeline: cycle-exact checks of the pipelined core.
//
// The core runs from simple test-bench memories. Each short program is
// run from reset (the first fetch is cycle 1) and the cycle in which each
// instruction reaches WB is compared with the expected pipeline timing:
//  - back-to-back dependent adds: forwarding, no stall (5-stage pattern,
//    one instruction completing per cycle),
//  - load then three users: exactly one stall cycle, the last user
//    completing 8 cycles after the load was fetched,
//  - a forward branch that is taken: predicted not taken, 3-cycle penalty,
//  - a backward loop branch: taken iteration costs nothing, the exit is
//    mispredicted and costs 3 cycles,
//  - j: redirected in fetch, no penalty.
// Register results are read through the debug port and compared with
// values worked out by hand.
module tb_mips_pipeline;
  import mips_tb_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dbg_reg_data;
  logic [7:0]  dmem_rdata, dmem_wdata;
  logic        dmem_we;
  logic [4:0]  dbg_reg_addr = '0;
  logic        retire_valid, retire_we;
  logic [31:0] retire_pc, retire_ir, retire_data;
  logic [4:0]  retire_dst;
  logic        ev_stall, ev_fwd_exmem, ev_fwd_memwb, ev_pred_taken, ev_jump, ev_mispredict;

  mips_pipeline dut (.*);

  logic [31:0] imem [64];
  logic [7:0]  dmem [256];
  assign imem_rdata = imem[imem_addr[7:2]];
  assign dmem_rdata = dmem[dmem_addr[7:0]];
  always @(posedge clk) if (dmem_we) dmem[dmem_addr[7:0]] <= dmem_wdata;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int first_retire [64];
  int n_stall, n_mispred, n_fwd_exmem, n_fwd_memwb, n_pred, n_jump;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input logic [31:0] prog[$], input int halt_idx);
    int cyc;
    foreach (imem[i]) imem[i] = (i < prog.size()) ? prog[i] : 32'h0;
    foreach (dmem[i]) dmem[i] = '0;
    foreach (first_retire[i]) first_retire[i] = -1;
    n_stall = 0; n_mispred = 0; n_fwd_exmem = 0; n_fwd_memwb = 0; n_pred = 0; n_jump = 0;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    cyc = 1;
    while (first_retire[halt_idx] < 0 && cyc < 500) begin
      @(negedge clk);
      cyc++;
      n_stall += int'(ev_stall); n_mispred += int'(ev_mispredict);
      n_fwd_exmem += int'(ev_fwd_exmem); n_fwd_memwb += int'(ev_fwd_memwb);
      n_pred += int'(ev_pred_taken); n_jump += int'(ev_jump);
      if (retire_valid && first_retire[retire_pc[7:2]] < 0) first_retire[retire_pc[7:2]] = cyc;
    end
    chk(cyc < 500, "program finished");
  endtask


  task automatic chk_reg(int r, logic [31:0] v, string what);
    dbg_reg_addr = 5'(r);
    #1;
    chk(dbg_reg_data == v, $sformatf("%s: $%0d=%0d expected %0d", what, r, dbg_reg_data, v));
  endtask

  initial begin : main
    logic [31:0] p[$];

    // A: dependent adds, forwarding from EX/MEM and MEM/WB.
    p = '{addi_(2, 0, 5), addi_(3, 0, 7), add_(1, 2, 3), add_(4, 5, 1), j_(4)};
    run(p, 4);
    for (int i = 0; i < 4; i++)
      chk(first_retire[i] == 5 + i, $sformatf("A: instr %0d in WB at %0d", i, first_retire[i]));
    chk(n_stall == 0 && n_fwd_exmem > 0 && n_fwd_memwb > 0, "A: forwarding without stall");
    chk_reg(1, 12, "A"); chk_reg(4, 12, "A");

    // B: load followed by three users: one stall.
    p = '{addi_(2, 0, 8), addi_(5, 0, 3), addi_(7, 0, 6), addi_(9, 0, 9), addi_(10, 0, 100),
          sb_(10, 0, 2), lb_(1, 0, 2), sub_(4, 1, 5), and_(6, 1, 7), or_(8, 1, 9), j_(10)};
    run(p, 10);
    for (int i = 0; i <= 6; i++)
      chk(first_retire[i] == 5 + i, $sformatf("B: instr %0d in WB at %0d", i, first_retire[i]));
    for (int i = 7; i <= 9; i++)
      chk(first_retire[i] == 6 + i, $sformatf("B: instr %0d in WB at %0d", i, first_retire[i]));
    chk(first_retire[9] - first_retire[6] + 5 == 9, "B: OR completes in cycle 9 counted from the load's fetch");
    chk(n_stall == 1, $sformatf("B: %0d stall cycles, expected 1", n_stall));
    chk_reg(1, 100, "B"); chk_reg(4, 97, "B"); chk_reg(6, 4, "B"); chk_reg(8, 109, "B");

    // C: forward branch taken, predicted not taken.
    p = '{beq_(0, 0, 2), addi_(1, 0, 1), addi_(2, 0, 2), addi_(3, 0, 3), j_(4)};
    run(p, 4);
    chk(first_retire[0] == 5 && first_retire[3] == 9, $sformatf("C: branch %0d, target %0d", first_retire[0], first_retire[3]));
    chk(first_retire[1] < 0 && first_retire[2] < 0, "C: wrong path squashed");
    chk(n_mispred == 1, "C: one misprediction");
    chk_reg(1, 0, "C"); chk_reg(2, 0, "C"); chk_reg(3, 3, "C");

    // D: two-iteration backward loop.
    p = '{addi_(1, 0, 2), addi_(1, 1, -1), bne_(1, 0, -2), addi_(2, 0, 5), j_(4)};
    run(p, 4);
    chk(first_retire[2] == 7, "D: first bne in WB at 7");
    chk(first_retire[3] == 13, $sformatf("D: exit instruction in WB at %0d, expected 13", first_retire[3]));
    chk(n_mispred == 1 && n_pred > 0, "D: one misprediction, at the loop exit");
    chk_reg(1, 0, "D"); chk_reg(2, 5, "D");

    // E: jump costs nothing.
    p = '{j_(2), addi_(1, 0, 1), addi_(2, 0, 2), j_(3)};
    run(p, 3);
    chk(first_retire[0] == 5 && first_retire[2] == 6, $sformatf("E: j %0d, target %0d", first_retire[0], first_retire[2]));
    chk(first_retire[1] < 0 && n_jump > 0 && n_mispred == 0, "E: no fall-through");
    chk_reg(1, 0, "E"); chk_reg(2, 2, "E");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
