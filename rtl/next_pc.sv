// next_pc: next address logic of the instruction fetch unit.
//
// Computes the address of the following instruction from the current PC:
// sequential code gives PC + 4; a branch (npc_sel = 1) whose ALU zero flag is
// set gives PC + 4 + (sign_ext(imm16) || 00), the immediate being a word
// offset from the next instruction. One adder forms PC + 4 (carry in 0,
// second operand the constant 4), a second adds the shifted, sign-extended
// offset, and a 2:1 multiplexer picks the result. Combinational; the PC
// register that closes the loop lives in ifetch.
module next_pc #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] pc,
  input  logic [15:0]  imm16,
  input  logic         npc_sel,
  input  logic         zero,
  output logic [N-1:0] pc_plus4,
  output logic [N-1:0] pc_next
);
  logic [N-1:0] offset, target;
  logic         co_seq, co_br;

  assign offset = {{(N-18){imm16[15]}}, imm16, 2'b00};

  adder #(.N(N)) u_inc (
    .a(pc), .b(N'(4)), .carry_in(1'b0), .sum(pc_plus4), .carry_out(co_seq)
  );

  adder #(.N(N)) u_br (
    .a(pc_plus4), .b(offset), .carry_in(1'b0), .sum(target), .carry_out(co_br)
  );

  mux2 #(.W(N)) u_sel (
    .a(pc_plus4), .b(target), .sel(npc_sel & zero), .y(pc_next)
  );

  // Address arithmetic wraps; the carries are not used.
  logic unused_carry;
  assign unused_carry = co_seq ^ co_br;
endmodule
