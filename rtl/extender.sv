// extender: widens the 16-bit immediate of an I-type instruction to 32 bits.
// ext_op = 1 copies bit 15 into the upper half (sign extension, used by LW,
// SW and BEQ); ext_op = 0 fills it with zeros (used by ORI). The name and
// polarity of ext_op are this design's own. Combinational.
module extender #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 32
) (
  input  logic [IN_W-1:0]  imm,
  input  logic             ext_op,
  output logic [OUT_W-1:0] ext
);
  assign ext = {{(OUT_W-IN_W){ext_op & imm[IN_W-1]}}, imm};
endmodule
