// tb_branch_cond: checks the E (A==B), Z (A==0) and N (A<0) comparator
// outputs on equal, unequal, zero, negative and random operands.
module tb_branch_cond;
  logic [31:0] a, b;
  logic e, z, n;
  int checks = 0, failures = 0;

  branch_cond dut (.a, .b, .e, .z, .n);

  task automatic try(logic [31:0] x, logic [31:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (e !== (x == y) || z !== (x == 0) || n !== ($signed(x) < 0)) begin
      failures++;
      $display("FAIL: a=%h b=%h e=%b z=%b n=%b", x, y, e, z, n);
    end
  endtask

  initial begin
    logic [31:0] r;
    try(0, 0); try(0, 1); try(1, 0); try(32'hffffffff, 32'hffffffff);
    try(32'h80000000, 32'h0); try(32'h7fffffff, 32'h7ffffffe);
    repeat (1000) begin
      r = $urandom;
      try(r, r);
      try(r, r ^ (32'd1 << $urandom_range(0, 31)));
      try($urandom, $urandom);
    end
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
