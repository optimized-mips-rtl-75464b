// tb_alu_control: checks every defined row of the ALU control table
// (aluop 00 -> ADD, 01 -> SUB, 10 with each of the five funct codes) and
// that funct is ignored when aluop is 00 or 01.
module tb_alu_control;
  import mips_pkg::*;
  logic [1:0] aluop;
  logic [5:0] funct;
  alu_ctrl_e  alucontrol;
  int checks = 0, failures = 0;

  alu_control dut (.aluop, .funct, .alucontrol);

  task automatic try(logic [1:0] op, logic [5:0] fn, logic [2:0] expect_code);
    aluop = op; funct = fn;
    #1;
    checks++;
    if (alucontrol !== expect_code) begin
      failures++;
      $display("FAIL: aluop=%b funct=%b -> %b, expected %b", op, fn, alucontrol, expect_code);
    end
  endtask

  initial begin
    for (int f = 0; f < 64; f++) begin
      try(2'b00, 6'(f), 3'b010);
      try(2'b01, 6'(f), 3'b110);
    end
    try(2'b10, 6'b100000, 3'b010);
    try(2'b10, 6'b100010, 3'b110);
    try(2'b10, 6'b100100, 3'b000);
    try(2'b10, 6'b100101, 3'b001);
    try(2'b10, 6'b101010, 3'b111);
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
