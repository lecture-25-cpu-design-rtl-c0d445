// alu: 32-bit arithmetic logic unit of the MIPS-lite datapath.
//
// alu_ctr selects the operation on busA (a) and busB (b): ADD and SUB run
// through the XOR-inverting adder-subtractor, OR and AND are bitwise, and
// SLT gives 1 when a < b as signed numbers (sign of a - b corrected by
// overflow), else 0. zero is 1 when the result is 0: with SUB it is the
// a == b test that BEQ uses. ADD, SUB and OR are what the instruction subset
// needs; AND and SLT are the further functions of the full MIPS ALU. The
// three-bit operation code values are this design's own. Combinational.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  alu_op_e      alu_ctr,
  output logic [N-1:0] result,
  output logic         zero
);
  logic [N-1:0] sum;
  logic         carry_out, overflow;
  logic         sub;

  // SLT needs a - b as well as SUB.
  assign sub = (alu_ctr == ALU_SUB) || (alu_ctr == ALU_SLT);

  addsub #(.N(N)) u_addsub (
    .a        (a),
    .b        (b),
    .sub      (sub),
    .result   (sum),
    .carry_out(carry_out),
    .overflow (overflow)
  );

  always_comb begin
    unique case (alu_ctr)
      ALU_ADD, ALU_SUB: result = sum;
      ALU_OR:           result = a | b;
      ALU_AND:          result = a & b;
      ALU_SLT:          result = {{(N-1){1'b0}}, sum[N-1] ^ overflow};
      default:          result = '0;
    endcase
  end

  assign zero = (result == '0);

  // The raw carry out is not needed by any of the operations.
  logic unused_carry;
  assign unused_carry = carry_out;
endmodule
