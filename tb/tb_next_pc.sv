// tb_next_pc: self-checking test of the next address logic: PC + 4 for
// sequential code and for a branch whose operands differ, and
// PC + 4 + (sign_ext(imm16) << 2) for a taken branch, with forward and
// backward offsets.
module tb_next_pc;
  logic [31:0] pc, pc_plus4, pc_next, exp;
  logic [15:0] imm16;
  logic        npc_sel, zero;
  int checks = 0, failures = 0;
  int taken = 0, backward = 0;

  next_pc #(.N(32)) dut (.pc(pc), .imm16(imm16), .npc_sel(npc_sel), .zero(zero),
                         .pc_plus4(pc_plus4), .pc_next(pc_next));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      pc      = {$urandom} & ~32'd3;
      imm16   = 16'($urandom);
      npc_sel = 1'($urandom);
      zero    = 1'($urandom);
      #1;
      if (npc_sel && zero) begin
        exp = pc + 32'd4 + {{14{imm16[15]}}, imm16, 2'b00};
        taken++;
        if (imm16[15]) backward++;
      end else begin
        exp = pc + 32'd4;
      end
      checks += 2;
      if (pc_plus4 !== pc + 32'd4) begin
        failures++;
        $display("FAIL pc+4 pc=%h -> %h", pc, pc_plus4);
      end
      if (pc_next !== exp) begin
        failures++;
        $display("FAIL pc=%h imm=%h sel=%b zero=%b -> %h, expected %h",
                 pc, imm16, npc_sel, zero, pc_next, exp);
      end
    end
    checks++;
    if (taken == 0 || backward == 0) begin
      failures++;
      $display("FAIL taken or backward branch never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
