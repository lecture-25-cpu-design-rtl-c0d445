// mips_control: main controller of the single-cycle CPU.
//
// Decodes the opcode and, for R-type instructions, the funct field into the
// datapath control points (see mips_pkg::ctrl_t). Combinational: the
// controls are valid one decoder delay after the instruction word.
//
//   instr  reg_dst alu_src mem_to_reg reg_wr mem_wr npc_sel ext_op alu_ctr
//   ADDU      1       0        0        1      0      0       -     ADD
//   SUBU      1       0        0        1      0      0       -     SUB
//   ORI       0       1        0        1      0      0       0     OR
//   LW        0       1        1        1      0      0       1     ADD
//   SW        -       1        -        0      1      0       1     ADD
//   BEQ       -       0        -        0      0      1       1     SUB
//
// The register transfers of each instruction fix the table; the signal set
// and the encodings are this design's. Any other opcode or funct sets
// illegal and drives no write and no branch, so it acts as a no-op.
module mips_control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl,
  output logic       illegal
);
  always_comb begin
    ctrl    = '{reg_dst: 1'b0, alu_src: 1'b0, mem_to_reg: 1'b0, reg_wr: 1'b0,
                mem_wr: 1'b0, npc_sel: 1'b0, ext_op: 1'b0, alu_ctr: ALU_ADD};
    illegal = 1'b0;
    case (op)
      OP_RTYPE: begin
        ctrl.reg_dst = 1'b1;
        case (funct)
          FN_ADDU: begin ctrl.reg_wr = 1'b1; ctrl.alu_ctr = ALU_ADD; end
          FN_SUBU: begin ctrl.reg_wr = 1'b1; ctrl.alu_ctr = ALU_SUB; end
          default: illegal = 1'b1;
        endcase
      end
      OP_ORI: begin
        ctrl.alu_src = 1'b1;
        ctrl.reg_wr  = 1'b1;
        ctrl.ext_op  = 1'b0;
        ctrl.alu_ctr = ALU_OR;
      end
      OP_LW: begin
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_wr     = 1'b1;
        ctrl.ext_op     = 1'b1;
        ctrl.alu_ctr    = ALU_ADD;
      end
      OP_SW: begin
        ctrl.alu_src = 1'b1;
        ctrl.mem_wr  = 1'b1;
        ctrl.ext_op  = 1'b1;
        ctrl.alu_ctr = ALU_ADD;
      end
      OP_BEQ: begin
        ctrl.npc_sel = 1'b1;
        ctrl.ext_op  = 1'b1;
        ctrl.alu_ctr = ALU_SUB;
      end
      default: illegal = 1'b1;
    endcase
  end
endmodule
