// tb_extender: self-checking test of the 16-to-32-bit immediate extender,
// zero extension (ext_op = 0) and sign extension (ext_op = 1).
module tb_extender;
  logic [15:0] imm;
  logic        ext_op;
  logic [31:0] ext, exp;
  int checks = 0, failures = 0;

  extender #(.IN_W(16), .OUT_W(32)) dut (.imm(imm), .ext_op(ext_op), .ext(ext));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      imm    = (i < 4) ? 16'(i * 16'h7fff) : 16'($urandom);
      ext_op = 1'(i >> 1);
      #1;
      exp = ext_op ? 32'($signed(imm)) : {16'h0000, imm};
      checks++;
      if (ext !== exp) begin
        failures++;
        $display("FAIL imm=%h ext_op=%b -> %h, expected %h", imm, ext_op, ext, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
