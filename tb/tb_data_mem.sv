// tb_data_mem: checks the byte memory against a model array: reset
// clears it, random byte writes land at the rising edge at the written
// address only, and both read ports return the current contents.
module tb_data_mem;
  logic clk = 1'b0, rst = 1'b1, we = 1'b0;
  logic [31:0] addr = '0, dbg_addr = '0;
  logic [7:0]  rdata, wdata = '0, dbg_rdata;
  logic [7:0]  model [1024];
  int checks = 0, failures = 0;

  data_mem dut (.clk, .rst, .addr, .rdata, .we, .wdata, .dbg_addr, .dbg_rdata);

  always #5 clk = ~clk;

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (3000) begin
      we = ($urandom_range(0, 1) == 1);
      addr = 32'($urandom_range(0, 1023));
      wdata = 8'($urandom);
      dbg_addr = 32'($urandom_range(0, 1023));
      #1;
      checks += 2;
      if (rdata !== model[addr]) begin failures++; $display("FAIL: read %0d", addr); end
      if (dbg_rdata !== model[dbg_addr]) begin failures++; $display("FAIL: dbg read %0d", dbg_addr); end
      @(posedge clk);
      if (we) model[addr] = wdata;
      @(negedge clk);
    end
    rst = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 1024; i += 37) begin
      dbg_addr = 32'(i); #1;
      checks++;
      if (dbg_rdata !== 8'h0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
