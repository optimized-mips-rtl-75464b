// regfile: 32 x 32-bit general-purpose register file.
//
// Two asynchronous read ports (rs and rt, addressed by instruction bits
// 25:21 and 20:16 in ID) and one write port driven from WB. Register 0
// always reads as zero and is never written. The write happens on the
// falling clock edge, so a value written by the instruction in WB is seen
// by the instruction reading it in ID in the same cycle: the first half of
// the cycle writes, the second half reads. That removes the need for a
// third forwarding path. A third read port (dbg_*) lets a test bench or
// debugger observe architectural state; it is this design's addition.
// Registers are cleared by reset (also this design's choice).
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [AW-1:0]    ra1,
  output logic [WIDTH-1:0] rd1,
  input  logic [AW-1:0]    ra2,
  output logic [WIDTH-1:0] rd2,
  input  logic             we,
  input  logic [AW-1:0]    wa,
  input  logic [WIDTH-1:0] wd,
  input  logic [AW-1:0]    dbg_ra,
  output logic [WIDTH-1:0] dbg_rd
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(negedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1    = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2    = (ra2 == '0) ? '0 : regs[ra2];
  assign dbg_rd = (dbg_ra == '0) ? '0 : regs[dbg_ra];
endmodule
