// btfn_predictor: static Backward-Taken / Forward-Not-taken prediction in IF.
//
// The instruction word is available in IF (single-cycle fetch), so its
// opcode and offset are examined there. A beq/bne with a negative offset
// (a backward branch, typically closing a loop) is predicted taken and
// fetch continues at NPC + (offset << 2); a forward branch is predicted not
// taken and fetch continues at NPC. The prediction bit travels with the
// branch and is checked when the branch completes in MEM. With BTFN = 0
// every branch is predicted not taken. An unconditional j is redirected
// here too, to {NPC[31:28], target, 00}; it needs no check later.
// Placing the prediction in IF (so a correctly predicted taken branch
// costs no cycle) and handling j here are this design's choices.
// Purely combinational.
module btfn_predictor
  import mips_pkg::*;
#(
  parameter bit BTFN = 1'b1
) (
  input  logic [31:0] instr,
  input  logic [31:0] npc,         // address of the fetched instruction + 4
  output logic        redirect,    // fetch from target next
  output logic        pred_taken,  // a branch predicted taken
  output logic [31:0] target
);
  logic [5:0]  op;
  logic [31:0] boff;
  logic        is_branch;

  assign op        = instr[31:26];
  assign boff      = {{14{instr[15]}}, instr[15:0], 2'b00};
  assign is_branch = (op == OP_BEQ) || (op == OP_BNE);

  always_comb begin
    pred_taken = 1'b0;
    redirect   = 1'b0;
    target     = npc + boff;
    if (op == OP_J) begin
      redirect = 1'b1;
      target   = {npc[31:28], instr[25:0], 2'b00};
    end else if (is_branch && BTFN && instr[15]) begin
      pred_taken = 1'b1;
      redirect   = 1'b1;
    end
  end
endmodule
