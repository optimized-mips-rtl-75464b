// mips_pkg: types and constants shared by the pipelined MIPS.
//
// Holds the instruction-set encodings (opcode and funct values of the
// eleven supported instructions), the 3-bit ALU control code, the control
// word that the decoder produces in ID and carries down the pipe, and the
// contents of the four pipeline registers IF/ID, ID/EX, EX/MEM and MEM/WB.
// All pipeline-register structs are chosen so that an all-zero value is a
// bubble: every write enable is 0 and the instruction word is 0, which is
// ADD $0,$0,$0, a no-op because register 0 is hardwired to zero.
// The encodings are the standard MIPS32 ones; bne (opcode 000101) is
// included because the branch-prediction benchmark uses it.
package mips_pkg;

  typedef enum logic [5:0] {
    OP_RTYPE = 6'b000000,
    OP_J     = 6'b000010,
    OP_BEQ   = 6'b000100,
    OP_BNE   = 6'b000101,
    OP_ADDI  = 6'b001000,
    OP_LB    = 6'b100000,
    OP_SB    = 6'b101000
  } opcode_e;

  localparam logic [5:0] FN_ADD = 6'b100000;
  localparam logic [5:0] FN_SUB = 6'b100010;
  localparam logic [5:0] FN_AND = 6'b100100;
  localparam logic [5:0] FN_OR  = 6'b100101;
  localparam logic [5:0] FN_SLT = 6'b101010;

  // ALU operation select ("alucontrol").
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_ctrl_e;

  // aluop from the main decoder to the ALU control unit.
  localparam logic [1:0] ALUOP_ADD   = 2'b00;
  localparam logic [1:0] ALUOP_SUB   = 2'b01;
  localparam logic [1:0] ALUOP_FUNCT = 2'b10;

  // Forwarding mux select for one ALU operand.
  typedef enum logic [1:0] {
    FWD_NONE  = 2'b00,  // value read from the register file in ID
    FWD_MEMWB = 2'b01,  // result in MEM/WB (ALU result or loaded byte)
    FWD_EXMEM = 2'b10   // ALU result in EX/MEM
  } fwd_sel_e;

  // Control word produced in ID. All-zero is a no-op.
  typedef struct packed {
    logic       reg_write;  // writes register dst in WB
    logic       mem_read;   // lb
    logic       mem_write;  // sb
    logic       mem_to_reg; // WB takes the loaded byte instead of the ALU result
    logic       alu_src_a;  // 1: ALU A input is NPC (branch target computation)
    logic       alu_src_b;  // 1: ALU B input is the formatted immediate
    logic [1:0] aluop;
    logic       branch;     // beq or bne, completed in MEM
    logic       branch_ne;  // 1 for bne
    logic       jump;       // j, redirected in IF
    logic       uses_rs;    // reads register rs
    logic       uses_rt;    // reads register rt
  } ctrl_t;

  typedef struct packed {
    logic        valid;     // a real instruction (0 for a bubble)
    logic [31:0] pc;
    logic [31:0] npc;       // pc + 4
    logic [31:0] ir;
    logic        pred_taken;
  } if_id_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] npc;
    logic [31:0] ir;
    logic        pred_taken;
    ctrl_t       ctrl;
    logic [31:0] rsv;       // register value of rs
    logic [31:0] rtv;       // register value of rt
    logic [31:0] imm;       // formatted immediate
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  dst;
  } id_ex_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] npc;
    logic [31:0] ir;
    logic        pred_taken;
    ctrl_t       ctrl;
    logic [31:0] alu;       // ALU result: data, effective address or branch target
    logic [31:0] rtv;       // store data
    logic        e;         // A == B
    logic        z;         // A == 0
    logic        n;         // A < 0
    logic [4:0]  dst;
  } ex_mem_t;

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] ir;
    logic        reg_write;
    logic        mem_to_reg;
    logic [31:0] alu;
    logic [31:0] md;        // loaded data (sign-extended byte)
    logic [4:0]  dst;
  } mem_wb_t;

endpackage
