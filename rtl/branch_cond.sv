// branch_cond: the three comparators of the EX stage.
//
// From the (forwarded) operands A and B it produces E = (A == B),
// Z = (A == 0) and N = (A < 0, the sign bit). The flags travel in the
// EX/MEM register to the MEM stage, where beq completes on E and bne on
// not E. Z and N are produced as the datapath provides them; no
// instruction of the present instruction set consumes them.
// Purely combinational.
module branch_cond #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             e,
  output logic             z,
  output logic             n
);
  assign e = (a == b);
  assign z = (a == '0);
  assign n = a[WIDTH-1];
endmodule
