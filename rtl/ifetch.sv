// ifetch: instruction fetch unit.
//
// The PC register drives the address of the instruction memory, whose
// combinational read gives the 32-bit instruction word of this cycle; the
// next address logic computes the following PC, which the PC register
// loads on every rising clock edge. Branch control (npc_sel) and the ALU's
// zero flag come from the rest of the datapath in the same cycle, so a BEQ
// decides its successor within its own cycle.
//
// Reset (synchronous, active high) sets the PC to RESET_PC. The program is
// written through the load port: while load_we is 1 the instruction memory
// is addressed by load_addr instead of the PC and load_data is written at
// the clock edge. Loading is meant to happen while rst is held. The reset
// value and the load port are this design's additions.
module ifetch #(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        npc_sel,
  input  logic        zero,
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  output logic [31:0] pc,
  output logic [31:0] pc_plus4,
  output logic [31:0] instr
);
  logic [31:0] pc_next, imem_addr;

  register #(.N(32), .RESET_VALUE(RESET_PC)) u_pc (
    .clk(clk), .rst(rst), .we(1'b1), .d(pc_next), .q(pc)
  );

  next_pc #(.N(32)) u_npc (
    .pc(pc), .imm16(instr[15:0]), .npc_sel(npc_sel), .zero(zero),
    .pc_plus4(pc_plus4), .pc_next(pc_next)
  );

  mux2 #(.W(32)) u_addr_sel (
    .a(pc), .b(load_addr), .sel(load_we), .y(imem_addr)
  );

  memory #(.WORDS(IMEM_WORDS), .W(32), .AW(32)) u_imem (
    .clk(clk), .write_enable(load_we), .address(imem_addr),
    .data_in(load_data), .data_out(instr)
  );
endmodule
