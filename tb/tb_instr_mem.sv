// tb_instr_mem: writes random words through the load port, then reads
// every word back by byte address (with random low address bits, which
// must be ignored) and compares with a model array.
module tb_instr_mem;
  logic clk = 1'b0, we = 1'b0;
  logic [31:0] addr = '0, rdata, wdata = '0;
  logic [7:0]  waddr = '0;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  instr_mem dut (.clk, .addr, .rdata, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 8'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    repeat (1000) begin
      int w;
      w = $urandom_range(0, 255);
      addr = {22'd0, 8'(w), 2'($urandom)};
      #1;
      checks++;
      if (rdata !== model[w]) begin failures++; $display("FAIL: word %0d", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
