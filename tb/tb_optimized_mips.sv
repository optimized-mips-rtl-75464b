// tb_optimized_mips: end-to-end test of the complete processor at its
// default parameters (forwarding and BTFN on, 256-word instruction memory,
// 1024-byte data memory).
//
// Each program is loaded through the program port while reset is held,
// then run. Every instruction that reaches WB is compared with an
// instruction-level reference model: its address, its instruction word,
// the register it writes and the value, and for sb the byte and address
// seen at the data-memory port. At the end all registers and all data
// bytes are compared. Programs:
//  - the instruction-set functionality test (an endless loop, stopped
//    after a fixed number of instructions),
//  - the Fibonacci program with a forward exit branch and a j back,
//  - the Fibonacci program with a backward bne loop; its sb must retire in
//    cycle 51 counted from the first fetch, and store 34 at address 255,
//  - a load-use sequence that needs one interlock cycle,
//  - random programs with dense register reuse, loads, stores, forward
//    branches and jumps, and random programs with a counted backward loop.
// The test counts stalls, both forwarding paths, predicted-taken branches,
// jumps and mispredictions, and fails if any of them never happened.
module tb_optimized_mips;
  import mips_tb_pkg::*;

  localparam int unsigned IMEM = 256;
  localparam int unsigned DMEM = 1024;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        prog_we = 1'b0;
  logic [7:0]  prog_addr = '0;
  logic [31:0] prog_data = '0;
  logic [4:0]  dbg_reg_addr = '0;
  logic [31:0] dbg_reg_data;
  logic [31:0] dbg_mem_addr = '0;
  logic [7:0]  dbg_mem_data;
  logic        retire_valid, retire_we, dmem_we;
  logic [31:0] retire_pc, retire_ir, retire_data, dmem_addr;
  logic [4:0]  retire_dst;
  logic [7:0]  dmem_wdata;
  logic        ev_stall, ev_fwd_exmem, ev_fwd_memwb, ev_pred_taken, ev_jump, ev_mispredict;

  optimized_mips dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_fwd_exmem = 0, n_fwd_memwb = 0, n_pred = 0, n_jump = 0, n_mispred = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  bit counting = 1'b0;
  always @(negedge clk) if (!rst && counting) begin
    n_stall     += int'(ev_stall);
    n_fwd_exmem += int'(ev_fwd_exmem);
    n_fwd_memwb += int'(ev_fwd_memwb);
    n_pred      += int'(ev_pred_taken);
    n_jump      += int'(ev_jump);
    n_mispred   += int'(ev_mispredict);
  end

  // Runs prog until the instruction at halt_idx retires or max_retire
  // instructions have retired. If marker_idx >= 0, the cycle in which that
  // instruction retires must equal exp_cycle.
  task automatic run(input string name, input logic [31:0] prog[$], input int halt_idx,
                     input int max_retire, input int marker_idx, input int exp_cycle);
    mips_iss iss = new(DMEM, IMEM);
    logic [31:0] st_addr[$];
    logic [7:0]  st_data[$];
    int cyc = 1, retired = 0, marker_cycle = -1;  // cycle 1: first fetch
    bit done = 0;
    // load program with the core in reset
    rst = 1'b1;
    for (int i = 0; i < IMEM; i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = 8'(i);
      prog_data = (i < prog.size()) ? prog[i] : 32'h0;
      iss.imem[i] = prog_data;
    end
    @(negedge clk); prog_we = 1'b0;
    @(negedge clk); rst = 1'b0;
    counting = 1'b1;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (dmem_we) begin
        st_addr.push_back(dmem_addr % DMEM);
        st_data.push_back(dmem_wdata);
      end
      if (retire_valid) begin
        iss.step();
        retired++;
        check(retire_pc == iss.last_pc,
              $sformatf("%s: retired pc %h, expected %h", name, retire_pc, iss.last_pc));
        check(retire_ir == iss.last_ir,
              $sformatf("%s: retired ir %h, expected %h", name, retire_ir, iss.last_ir));
        check(retire_we == iss.wrote_reg,
              $sformatf("%s: pc %h register write %0b, expected %0b", name, retire_pc, retire_we, iss.wrote_reg));
        if (iss.wrote_reg)
          check(retire_dst == 5'(iss.w_dst) && retire_data == iss.w_data,
                $sformatf("%s: pc %h wrote $%0d=%h, expected $%0d=%h", name, retire_pc,
                          retire_dst, retire_data, iss.w_dst, iss.w_data));
        if (iss.stored) begin
          if (st_addr.size() == 0) check(1'b0, $sformatf("%s: pc %h store missing", name, retire_pc));
          else begin
            logic [31:0] sa; logic [7:0] sd;
            sa = st_addr.pop_front(); sd = st_data.pop_front();
            check(sa == iss.s_addr && sd == iss.s_data,
                  $sformatf("%s: store [%h]=%h, expected [%h]=%h", name, sa, sd, iss.s_addr, iss.s_data));
          end
        end
        if (marker_idx >= 0 && marker_cycle < 0 && retire_pc == 32'(marker_idx * 4))
          marker_cycle = cyc;
        if ((halt_idx >= 0 && retire_pc == 32'(halt_idx * 4)) || retired >= max_retire)
          done = 1;
      end
      if (cyc > 20000) begin
        check(1'b0, $sformatf("%s: did not finish", name));
        done = 1;
      end
    end
    counting = 1'b0;
    check(st_addr.size() == 0, $sformatf("%s: %0d unexpected stores", name, st_addr.size()));
    if (marker_idx >= 0) begin
      check(marker_cycle == exp_cycle,
            $sformatf("%s: marker retired in cycle %0d, expected %0d", name, marker_cycle, exp_cycle));
      $display("%s: marker instruction retired in cycle %0d", name, marker_cycle);
    end
    // architectural state
    for (int r = 0; r < 32; r++) begin
      dbg_reg_addr = 5'(r);
      #1;
      check(dbg_reg_data == iss.regs[r],
            $sformatf("%s: final $%0d=%h, expected %h", name, r, dbg_reg_data, iss.regs[r]));
    end
    for (int a = 0; a < DMEM; a++) begin
      dbg_mem_addr = 32'(a);
      #1;
      check(dbg_mem_data == iss.mem[a],
            $sformatf("%s: final mem[%0d]=%h, expected %h", name, a, dbg_mem_data, iss.mem[a]));
    end
    $display("%s: %0d instructions retired in %0d cycles", name, retired, cyc);
  endtask

  localparam logic [5:0] FNS [5] = '{6'b100000, 6'b100010, 6'b100100, 6'b100101, 6'b101010};

  function automatic int rreg();
    return $urandom_range(0, 7);
  endfunction

  // One random instruction at index i; branches and jumps land no
  // further than index lim. Destinations are $0..$6 ($7 is a loop counter).
  function automatic logic [31:0] rand_instr(int i, int lim, bit allow_j);
    int k, off, t, d;
    k = $urandom_range(0, allow_j ? 9 : 8);
    d = $urandom_range(0, 6);
    case (k)
      0, 1: return r_op(FNS[$urandom_range(0, 4)], d, rreg(), rreg());
      2, 3: return addi_(d, rreg(), $urandom_range(0, 200) - 100);
      4:    return lb_(d, $urandom_range(0, 63), 0);
      5:    return sb_(rreg(), $urandom_range(0, 63), 0);
      6:    return lb_(d, $urandom_range(0, 63), rreg());
      7:    return sb_(rreg(), $urandom_range(0, 63), rreg());
      8: begin
        off = $urandom_range(0, 3);
        if (i + 1 + off > lim) off = lim - i - 1;
        if (off < 0) off = 0;
        return ($urandom_range(0, 1) == 1) ? beq_(rreg(), rreg(), off) : bne_(rreg(), rreg(), off);
      end
      default: begin
        t = i + 1 + $urandom_range(0, 2);
        if (t > lim) t = lim;
        return j_(t);
      end
    endcase
  endfunction

  initial begin : main
    logic [31:0] p[$];
    // Functionality test: every instruction; endless loop through j 7.
    p = '{addi_(3, 0, 8), addi_(4, 0, -2), add_(5, 3, 4), sub_(6, 3, 4), and_(5, 3, 4),
          or_(6, 3, 4), slt_(5, 3, 4), beq_(6, 5, 4), sb_(6, 2, 0), lb_(5, 2, 0), j_(7)};
    run("functionality", p, -1, 40, -1, 0);

    // Fibonacci, forward exit branch and j back to the loop head.
    p = '{addi_(3, 0, 10), addi_(4, 0, 1), addi_(5, 0, -1),
          beq_(3, 0, 4), add_(4, 4, 5), sub_(5, 4, 5), addi_(3, 3, -1), j_(3),
          sb_(4, 255, 0), j_(9)};
    run("fibonacci_forward", p, 9, 1000, -1, 0);

    // Fibonacci, backward loop: 51 cycles to the retirement of sb.
    p = '{addi_(3, 0, 10), addi_(4, 0, 1), addi_(5, 0, -1),
          add_(4, 4, 5), sub_(5, 4, 5), addi_(3, 3, -1), bne_(3, 0, -4),
          sb_(4, 255, 0), j_(8)};
    run("fibonacci_backward", p, 8, 1000, 7, 51);
    dbg_mem_addr = 32'd255; #1;
    check(dbg_mem_data == 8'd34, $sformatf("fibonacci_backward: mem[255]=%0d, expected 34", dbg_mem_data));

    // Load-use: LD; DSUB; AND; OR as in the classic example, plus a store
    // and a branch that read the loaded register through rt.
    p = '{addi_(2, 0, 16), addi_(9, 0, 77), sb_(9, 4, 2), addi_(5, 0, 3), addi_(7, 0, 12),
          lb_(1, 4, 2), sub_(4, 1, 5), and_(6, 1, 7), or_(8, 1, 9),
          lb_(10, 4, 2), sb_(10, 40, 0),
          lb_(11, 40, 0), beq_(9, 11, 1), addi_(12, 0, 1), addi_(13, 0, 2), j_(15)};
    run("load_use", p, 15, 1000, -1, 0);

    // Random straight-line programs with forward branches and jumps.
    for (int s = 0; s < 30; s++) begin
      automatic int n = 120;
      p = {};
      for (int i = 0; i < n; i++) p.push_back(rand_instr(i, n, 1'b1));
      p.push_back(j_(n));
      run($sformatf("random_%0d", s), p, n, 10000, -1, 0);
    end

    // Random programs with a counted backward loop (counter in $7, which
    // the random body never writes): BTFN under data hazards.
    for (int s = 0; s < 20; s++) begin
      automatic int body_start, body_len, iters;
      p = {};
      for (int i = 0; i < 6; i++) p.push_back(rand_instr(i, 6, 1'b0));
      iters = $urandom_range(1, 5);
      p.push_back(addi_(7, 0, iters));
      body_start = p.size();
      body_len = $urandom_range(4, 14);
      for (int i = 0; i < body_len; i++)
        p.push_back(rand_instr(body_start + i, body_start + body_len, 1'b0));
      p.push_back(addi_(7, 7, -1));
      p.push_back(bne_(7, 0, body_start - (p.size() + 1)));
      for (int i = 0; i < 4; i++) p.push_back(rand_instr(p.size(), p.size() + 4 - i, 1'b0));
      p.push_back(j_(p.size()));
      run($sformatf("random_loop_%0d", s), p, p.size() - 1, 10000, -1, 0);
    end

    $display("events: stall=%0d fwd_exmem=%0d fwd_memwb=%0d pred_taken=%0d jump=%0d mispredict=%0d",
             n_stall, n_fwd_exmem, n_fwd_memwb, n_pred, n_jump, n_mispred);
    check(n_stall > 0,     "load interlock never stalled");
    check(n_fwd_exmem > 0, "EX/MEM forwarding never used");
    check(n_fwd_memwb > 0, "MEM/WB forwarding never used");
    check(n_pred > 0,      "no backward branch predicted taken");
    check(n_jump > 0,      "no jump redirected");
    check(n_mispred > 0,   "no misprediction recovered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
