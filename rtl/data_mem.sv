// data_mem: byte-addressed data memory (the MEM-stage memory port).
//
// BYTES bytes. The read port is asynchronous, so lb gets its byte within
// the MEM cycle; the write port stores one byte at the rising clock edge
// at the end of MEM (sb). Addresses wrap modulo BYTES. A second,
// read-only port (dbg_*) lets a test bench inspect memory. Reset clears
// the whole array in one cycle. The byte width follows from the
// instruction set (only lb and sb access data); the size, the address
// wrap-around, the reset and the debug port are this design's choices.
module data_mem #(
  parameter int unsigned BYTES = 1024,
  localparam int unsigned AW = $clog2(BYTES)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] addr,
  output logic [7:0]  rdata,
  input  logic        we,
  input  logic [7:0]  wdata,
  input  logic [31:0] dbg_addr,
  output logic [7:0]  dbg_rdata
);
  logic [7:0] mem [BYTES];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < BYTES; i++) mem[i] <= '0;
    end else if (we) begin
      mem[addr[AW-1:0]] <= wdata;
    end
  end

  assign rdata     = mem[addr[AW-1:0]];
  assign dbg_rdata = mem[dbg_addr[AW-1:0]];
endmodule
