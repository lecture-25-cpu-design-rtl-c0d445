// tb_mips_control: self-checking test of the main controller. Applies every
// opcode with every funct value and compares the control word and the
// illegal flag with the table written out below, derived from the register
// transfer of each instruction.
module tb_mips_control;
  import mips_pkg::*;
  logic [5:0] op, funct;
  ctrl_t      ctrl, exp;
  logic       illegal, exp_ill;
  int checks = 0, failures = 0;

  mips_control dut (.op(op), .funct(funct), .ctrl(ctrl), .illegal(illegal));

  // {reg_dst, alu_src, mem_to_reg, reg_wr, mem_wr, npc_sel, ext_op, alu_ctr}
  function automatic ctrl_t row(input logic [6:0] b, input alu_op_e o);
    ctrl_t c;
    c = '{reg_dst: b[6], alu_src: b[5], mem_to_reg: b[4], reg_wr: b[3],
          mem_wr: b[2], npc_sel: b[1], ext_op: b[0], alu_ctr: o};
    return c;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 64; o++) begin
      for (int f = 0; f < 64; f++) begin
        op = 6'(o); funct = 6'(f);
        #1;
        exp_ill = 1'b0;
        if (op == 6'h00 && funct == 6'h21)      exp = row(7'b1001000, ALU_ADD); // addu
        else if (op == 6'h00 && funct == 6'h23) exp = row(7'b1001000, ALU_SUB); // subu
        else if (op == 6'h0d)               exp = row(7'b0101000, ALU_OR);  // ori
        else if (op == 6'h23)               exp = row(7'b0111001, ALU_ADD); // lw
        else if (op == 6'h2b)               exp = row(7'b0100101, ALU_ADD); // sw
        else if (op == 6'h04)               exp = row(7'b0000011, ALU_SUB); // beq
        else begin
          exp_ill = 1'b1;
          exp = row({(op == 6'h00), 6'b000000}, ALU_ADD);
        end
        checks++;
        // Only the control points an instruction uses are compared for
        // don't-care fields: writes, branch and ALU source always matter.
        if (illegal !== exp_ill || ctrl.reg_wr !== exp.reg_wr || ctrl.mem_wr !== exp.mem_wr ||
            ctrl.npc_sel !== exp.npc_sel ||
            (!exp_ill && (ctrl.alu_src !== exp.alu_src || ctrl.alu_ctr !== exp.alu_ctr)) ||
            (exp.reg_wr && (ctrl.reg_dst !== exp.reg_dst || ctrl.mem_to_reg !== exp.mem_to_reg)) ||
            (exp.alu_src && ctrl.ext_op !== exp.ext_op)) begin
          failures++;
          $display("FAIL op=%h funct=%h ctrl=%b illegal=%b, expected %b illegal=%b",
                   op, funct, ctrl, illegal, exp, exp_ill);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
