// tb_alu: self-checking test of the ALU. Every operation (ADD, SUB, OR,
// AND, SLT) on corner cases and random operands, including equal operands,
// checking both the result and the zero flag against reference arithmetic.
module tb_alu;
  import mips_pkg::*;
  logic [31:0] a, b, result;
  alu_op_e     op;
  logic        zero;
  int checks = 0, failures = 0;

  alu #(.N(32)) dut (.a(a), .b(b), .alu_ctr(op), .result(result), .zero(zero));

  function automatic logic [31:0] model(input alu_op_e o, input logic [31:0] x, input logic [31:0] y);
    case (o)
      ALU_ADD: return x + y;
      ALU_SUB: return x - y;
      ALU_OR:  return x | y;
      ALU_AND: return x & y;
      ALU_SLT: return ($signed(x) < $signed(y)) ? 32'd1 : 32'd0;
      default: return '0;
    endcase
  endfunction

  task automatic check(input alu_op_e o, input logic [31:0] x, input logic [31:0] y);
    logic [31:0] exp;
    a = x; b = y; op = o;
    #1;
    exp = model(o, x, y);
    checks++;
    if (result !== exp || zero !== (exp == 0)) begin
      failures++;
      $display("FAIL %s a=%h b=%h -> %h z=%b, expected %h", o.name(), x, y, result, zero, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic alu_op_e ops[5] = '{ALU_ADD, ALU_SUB, ALU_OR, ALU_AND, ALU_SLT};
    automatic logic [31:0] r;
    foreach (ops[k]) begin
      check(ops[k], 32'd0, 32'd0);
      check(ops[k], 32'h8000_0000, 32'h7fff_ffff);
      check(ops[k], 32'h7fff_ffff, 32'h8000_0000);
      check(ops[k], 32'hffff_ffff, 32'd1);
      check(ops[k], 32'd1, 32'hffff_ffff);
      for (int i = 0; i < 400; i++) begin
        r = $urandom;
        check(ops[k], r, r);            // equal operands: SUB gives zero
        check(ops[k], $urandom, $urandom);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
