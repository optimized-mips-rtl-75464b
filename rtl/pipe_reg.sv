// pipe_reg: one pipeline register (IF/ID, ID/EX, EX/MEM or MEM/WB).
//
// Edge-triggered flip-flops that capture d at the rising clock edge. When
// en is low the register keeps its contents (the stage is frozen by a
// stall, i.e. the contents re-circulate). When clr is high the register
// loads all zeros, which inserts a bubble: an all-zero instruction word is
// ADD $0,$0,$0 and all-zero control bits write nothing. clr has priority
// over en; reset also clears. The payload type T is a parameter.
module pipe_reg #(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  input  logic clr,
  input  T     d,
  output T     q
);
  always_ff @(posedge clk) begin
    if (rst || clr) q <= '0;
    else if (en)    q <= d;
  end
endmodule
