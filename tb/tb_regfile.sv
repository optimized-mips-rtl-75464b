// tb_regfile: checks the register file against an array model: random
// writes and reads on all three read ports, $0 reading zero even after a
// write to it, reset clearing every register, and the falling-edge write
// (a value written in a cycle is readable in the second half of that
// same cycle, before the next rising edge).
module tb_regfile;
  logic clk = 1'b0, rst = 1'b1, we = 1'b0;
  logic [4:0] ra1 = '0, ra2 = '0, wa = '0, dbg_ra = '0;
  logic [31:0] rd1, rd2, wd = '0, dbg_rd;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst, .ra1, .rd1, .ra2, .rd2, .we, .wa, .wd, .dbg_ra, .dbg_rd);

  always #5 clk = ~clk;

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    @(posedge clk); #1 rst = 1'b0;
    repeat (600) begin
      // drive a write just after the rising edge
      we = ($urandom_range(0, 3) != 0);
      wa = 5'($urandom);
      wd = $urandom;
      ra1 = 5'($urandom); ra2 = 5'($urandom); dbg_ra = 5'($urandom);
      #1;
      chk(rd1, model[ra1], "rd1 before write");
      // after the falling edge the write is visible in the same cycle
      @(negedge clk); #1;
      if (we && wa != 0) model[wa] = wd;
      ra1 = wa;
      #1;
      chk(rd1, model[wa], "rd1 same-cycle read of written register");
      chk(rd2, model[ra2], "rd2");
      chk(dbg_rd, model[dbg_ra], "dbg");
      @(posedge clk); #1;
    end
    // $0 stays zero
    we = 1'b1; wa = 5'd0; wd = 32'hdeadbeef; ra1 = 5'd0;
    @(negedge clk); #1;
    chk(rd1, 32'h0, "$0 after write");
    // reset clears everything
    we = 1'b0; rst = 1'b1;
    @(negedge clk); #1;
    for (int r = 0; r < 32; r++) begin
      dbg_ra = 5'(r); #1;
      chk(dbg_rd, 32'h0, "after reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
