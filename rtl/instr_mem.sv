// instr_mem: instruction memory (the IF-stage memory port).
//
// WORDS 32-bit words, read asynchronously with the byte address from the
// PC (bits 1:0 ignored, upper address bits beyond the array wrap), so a
// whole instruction is fetched in a single cycle. A synchronous write port
// loads the program while the core is held in reset. Being separate from
// the data memory, it removes the IF/MEM structural hazard. The size is
// this design's choice.
module instr_mem #(
  parameter int unsigned WORDS = 256,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [31:0]   addr,
  output logic [31:0]   rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,   // word address
  input  logic [31:0]   wdata
);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[addr[AW+1:2]];
endmodule
