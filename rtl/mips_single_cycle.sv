// mips_single_cycle: single-cycle CPU for the MIPS-lite instruction subset
// ADDU, SUBU, ORI, LW, SW and BEQ.
//
// Every instruction passes all five steps (fetch, decode/register read,
// execute, memory, register write) in one long clock cycle. Within the
// cycle everything is combinational: the PC addresses the instruction
// memory; the controller decodes op/funct; rs and rt read the register file;
// the ALU combines busA with busB or with the extended immediate; the data
// memory is read (LW) at the ALU result; and the next PC is chosen. At the
// rising clock edge the PC, the destination register (rd for R-type, rt for
// ORI/LW) and, for SW, the data memory word are all written at once.
// So the CPI is 1 and the clock period must cover the slowest instruction,
// LW, whose path runs through both memories, the register file and the ALU.
//
// Interface:
//   clk, rst           rising-edge clock, synchronous active-high reset
//                      (PC := RESET_PC; register and memory writes are
//                      suppressed while rst is 1)
//   imem_load_*        program load port into the instruction memory, used
//                      while rst is held (byte address, one word per clock)
//   pc, instr          address and word of the instruction of this cycle
//   reg_we/reg_waddr/reg_wdata   register write that this instruction will
//                      commit at the next clock edge
//   mem_we/mem_addr/mem_wdata    data memory write of this instruction
//   branch_taken       this instruction is a BEQ whose operands are equal
//   illegal            opcode/funct outside the subset (executed as no-op)
//
// Separate instruction and data memories, register 0 wired to zero, the
// reset and load port, and the memory sizes are this design's choices.
// Two assertions check in simulation that no instruction writes both a
// register and a memory word and that the PC stays word aligned; the PC's
// two low bits are therefore constant zero after synthesis.
module mips_single_cycle
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_load_we,
  input  logic [31:0] imem_load_addr,
  input  logic [31:0] imem_load_data,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        reg_we,
  output logic [4:0]  reg_waddr,
  output logic [31:0] reg_wdata,
  output logic        mem_we,
  output logic [31:0] mem_addr,
  output logic [31:0] mem_wdata,
  output logic        branch_taken,
  output logic        illegal
);
  rtype_t      f;
  ctrl_t       ctrl;
  logic [31:0] pc_plus4;
  logic [31:0] bus_a, bus_b, bus_w, imm_ext, alu_b, alu_result, dmem_out;
  logic [REG_AW-1:0] rw;
  logic        zero;

  // 1. Instruction fetch and next address.
  ifetch #(.IMEM_WORDS(IMEM_WORDS), .RESET_PC(RESET_PC)) u_ifetch (
    .clk(clk), .rst(rst), .npc_sel(ctrl.npc_sel), .zero(zero),
    .load_we(imem_load_we), .load_addr(imem_load_addr),
    .load_data(imem_load_data),
    .pc(pc), .pc_plus4(pc_plus4), .instr(instr)
  );

  assign f = rtype_t'(instr);

  // 2. Decode and register read.
  mips_control u_ctrl (
    .op(f.op), .funct(f.funct), .ctrl(ctrl), .illegal(illegal)
  );

  mux2 #(.W(REG_AW)) u_regdst (
    .a(f.rt), .b(f.rd), .sel(ctrl.reg_dst), .y(rw)
  );

  regfile #(.NREGS(NREGS), .W(XLEN)) u_rf (
    .clk(clk), .we(reg_we), .rw(rw), .bus_w(bus_w),
    .ra(f.rs), .rb(f.rt), .bus_a(bus_a), .bus_b(bus_b)
  );

  extender #(.IN_W(16), .OUT_W(32)) u_ext (
    .imm(instr[15:0]), .ext_op(ctrl.ext_op), .ext(imm_ext)
  );

  // 3. Execute.
  mux2 #(.W(32)) u_alusrc (
    .a(bus_b), .b(imm_ext), .sel(ctrl.alu_src), .y(alu_b)
  );

  alu #(.N(XLEN)) u_alu (
    .a(bus_a), .b(alu_b), .alu_ctr(ctrl.alu_ctr),
    .result(alu_result), .zero(zero)
  );

  // 4. Memory.
  memory #(.WORDS(DMEM_WORDS), .W(32), .AW(32)) u_dmem (
    .clk(clk), .write_enable(mem_we), .address(alu_result),
    .data_in(bus_b), .data_out(dmem_out)
  );

  // 5. Register write.
  mux2 #(.W(32)) u_memtoreg (
    .a(alu_result), .b(dmem_out), .sel(ctrl.mem_to_reg), .y(bus_w)
  );

  assign reg_we       = ctrl.reg_wr & ~rst;
  assign mem_we       = ctrl.mem_wr & ~rst;
  assign reg_waddr    = rw;
  assign reg_wdata    = bus_w;
  assign mem_addr     = alu_result;
  assign mem_wdata    = bus_b;
  assign branch_taken = ctrl.npc_sel & zero;

  // Rules of the datapath: an instruction writes a register or a memory
  // word, never both, and the PC stays word aligned.
  a_one_write: assert property (@(posedge clk) disable iff (rst) !(reg_we && mem_we))
    else $error("register and memory written by one instruction");
  a_pc_aligned: assert property (@(posedge clk) disable iff (rst) pc[1:0] == 2'b00)
    else $error("PC not word aligned: %h", pc);

  // shamt is part of the R-type format but no instruction of the subset
  // uses it; PC + 4 is only needed inside the fetch unit.
  logic unused;
  assign unused = ^{f.shamt, pc_plus4};
endmodule
