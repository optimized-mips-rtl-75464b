// tb_fig18_cycles: cycle counts of the backward-loop Fibonacci program on
// three pipeline configurations.
//
// The program (10 loop iterations of add, sub, addi, bne, then sb) is run
// on three copies of the processor: the full design (forwarding and BTFN
// prediction), one without prediction (every branch predicted not taken)
// and one with neither forwarding nor prediction. For each, the cycle in
// which the final sb reaches WB is measured, counting the first fetch as
// cycle 1, and compared with the value worked out by hand:
//  - full design: 44 instructions + 4 fill cycles + 3 for the one
//    mispredicted loop exit = 51,
//  - no prediction: 48 + 3 for each of the 9 taken back branches = 75,
//  - no forwarding: 75 + 2 stall cycles for each back-to-back dependence
//    through the falling-edge register file (add->sub, addi->bne in every
//    iteration, and addi $5 -> add in the first) = 75 + 2*21 = 117.
// Each copy must also store 34 at address 255. The assembled program is
// first compared word by word with its published machine code.
module tb_fig18_cycles;
  import mips_tb_pkg::*;

  localparam int NCFG = 3;
  localparam bit FWD  [NCFG] = '{1'b1, 1'b1, 1'b0};
  localparam bit PRED [NCFG] = '{1'b1, 1'b0, 1'b0};
  localparam int EXP  [NCFG] = '{51, 75, 117};
  localparam logic [31:0] CODE [8] = '{32'h2003000a, 32'h20040001, 32'h2005ffff, 32'h00852020,
                                      32'h00852822, 32'h2063ffff, 32'h1460fffc, 32'ha00400ff};

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        prog_we = 1'b0;
  logic [7:0]  prog_addr = '0;
  logic [31:0] prog_data = '0;
  logic [31:0] dbg_mem_addr = 32'd255;
  logic [7:0]  dbg_mem_data [NCFG];
  logic        retire_valid [NCFG];
  logic [31:0] retire_pc [NCFG];
  logic        ev_stall [NCFG], ev_mispredict [NCFG];

  always #5 clk = ~clk;

  for (genvar g = 0; g < NCFG; g++) begin : cfg
    logic [31:0] dbg_reg_data, retire_ir, retire_data, dmem_addr;
    logic        retire_we, dmem_we, ev_fwd_exmem, ev_fwd_memwb, ev_pred_taken, ev_jump;
    logic [4:0]  retire_dst;
    logic [7:0]  dmem_wdata;
    optimized_mips #(.FORWARDING(FWD[g]), .BTFN(PRED[g])) dut (
      .clk, .rst, .prog_we, .prog_addr, .prog_data,
      .dbg_reg_addr(5'd4), .dbg_reg_data,
      .dbg_mem_addr, .dbg_mem_data(dbg_mem_data[g]),
      .retire_valid(retire_valid[g]), .retire_pc(retire_pc[g]), .retire_ir,
      .retire_we, .retire_dst, .retire_data,
      .dmem_we, .dmem_addr, .dmem_wdata,
      .ev_stall(ev_stall[g]), .ev_fwd_exmem, .ev_fwd_memwb, .ev_pred_taken, .ev_jump,
      .ev_mispredict(ev_mispredict[g])
    );
  end

  int checks = 0, failures = 0;
  int done_cycle [NCFG];
  int stalls [NCFG], mispredicts [NCFG];

  initial begin : main
    logic [31:0] p[$];
    int cyc;
    p = '{addi_(3, 0, 10), addi_(4, 0, 1), addi_(5, 0, -1),
          add_(4, 4, 5), sub_(5, 4, 5), addi_(3, 3, -1), bne_(3, 0, -4),
          sb_(4, 255, 0), j_(8)};
    // The assembled words must equal the published machine code.
    foreach (CODE[i]) begin
      checks++;
      if (p[i] != CODE[i]) begin
        failures++;
        $display("FAIL: word %0d assembled %h, published %h", i, p[i], CODE[i]);
      end
    end
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 8'(i);
      prog_data = (i < p.size()) ? p[i] : 32'h0;
    end
    @(negedge clk); prog_we = 1'b0;
    foreach (done_cycle[g]) begin
      done_cycle[g] = -1; stalls[g] = 0; mispredicts[g] = 0;
    end
    @(negedge clk); rst = 1'b0;
    cyc = 1;  // this half cycle belongs to the first fetch
    while (cyc < 300) begin
      @(negedge clk);
      cyc++;
      for (int g = 0; g < NCFG; g++) begin
        if (done_cycle[g] < 0) begin
          stalls[g]      += int'(ev_stall[g]);
          mispredicts[g] += int'(ev_mispredict[g]);
          if (retire_valid[g] && retire_pc[g] == 32'd28) done_cycle[g] = cyc;
        end
      end
    end
    for (int g = 0; g < NCFG; g++) begin
      $display("config forwarding=%0b btfn=%0b: sb retired in cycle %0d (expected %0d), %0d stall cycles, %0d mispredictions, mem[255]=%0d",
               FWD[g], PRED[g], done_cycle[g], EXP[g], stalls[g], mispredicts[g], dbg_mem_data[g]);
      checks++;
      if (done_cycle[g] != EXP[g]) failures++;
      checks++;
      if (dbg_mem_data[g] != 8'd34) failures++;
    end
    // mechanism checks: prediction leaves one misprediction, no prediction nine
    checks++; if (mispredicts[0] != 1) failures++;
    checks++; if (mispredicts[1] != 9) failures++;
    checks++; if (stalls[0] != 0 || stalls[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
