// mips_pkg: types and constants shared by the MIPS-lite single-cycle CPU.
//
// The instruction subset is ADDU, SUBU (R-type), ORI, LW, SW and BEQ
// (I-type). Field positions follow the MIPS formats: op[31:26], rs[25:21],
// rt[20:16], rd[15:11], shamt[10:6], funct[5:0], imm16[15:0]. The numeric
// opcode and funct values are the standard MIPS32 encodings; the control
// signal set (RegDst, ALUSrc, MemtoReg, RegWr, MemWr, nPC_sel, ExtOp, ALUctr)
// is this design's choice of control points for the datapath, of which only
// RegWr and ALUctr are named by the datapath drawing it is built from.
package mips_pkg;

  localparam int unsigned XLEN     = 32;  // word and register width
  localparam int unsigned NREGS    = 32;  // general purpose registers
  localparam int unsigned REG_AW   = 5;   // register specifier width

  // Primary opcodes (instruction bits 31:26).
  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_BEQ   = 6'h04,
    OP_ORI   = 6'h0d,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2b
  } opcode_e;

  // Function codes of the R-type instructions (bits 5:0).
  typedef enum logic [5:0] {
    FN_ADDU = 6'h21,
    FN_SUBU = 6'h23
  } funct_e;

  // ALU operations. ADD, SUB and OR are what the subset needs; AND and SLT
  // are the two further functions of the full MIPS ALU.
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_OR  = 3'd2,
    ALU_AND = 3'd3,
    ALU_SLT = 3'd4
  } alu_op_e;

  // Control points driven by the controller.
  typedef struct packed {
    logic    reg_dst;     // 1: write rd, 0: write rt
    logic    alu_src;     // 1: ALU B input is the extended immediate
    logic    mem_to_reg;  // 1: register write data comes from data memory
    logic    reg_wr;      // register file write enable
    logic    mem_wr;      // data memory write enable
    logic    npc_sel;     // 1: instruction is a branch (taken when zero)
    logic    ext_op;      // 1: sign extend imm16, 0: zero extend
    alu_op_e alu_ctr;     // ALU operation
  } ctrl_t;

  // Decoded instruction fields.
  typedef struct packed {
    logic [5:0]  op;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [4:0]  rd;
    logic [4:0]  shamt;
    logic [5:0]  funct;
  } rtype_t;

endpackage
