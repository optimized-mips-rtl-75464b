// tb_pipe_reg: checks a pipeline register: capture on the rising edge
// when enabled, hold when the enable is low (stall), clear to zero when
// clr is high (bubble, taking priority over hold) and on reset. A model
// register in the test bench predicts every cycle.
module tb_pipe_reg;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, clr = 1'b0;
  logic [39:0] d = '0, q, model;
  int checks = 0, failures = 0;
  int holds = 0, clears = 0;

  pipe_reg #(.T(logic [39:0])) dut (.clk, .rst, .en, .clr, .d, .q);

  always #5 clk = ~clk;

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    repeat (500) begin
      en  = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 7) == 0);
      d   = {$urandom, 8'($urandom)};
      @(posedge clk);
      if (clr) begin model = '0; clears++; end
      else if (en) model = d;
      else holds++;
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL: q=%h expected %h", q, model);
      end
    end
    rst = 1'b1;
    @(negedge clk);
    checks++;
    if (q !== '0) failures++;
    checks++;
    if (holds == 0 || clears == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
