// tb_ifetch: self-checking test of the instruction fetch unit. Loads a
// random program through the load port while reset is held, then runs with
// random branch requests and zero flags. Each cycle the PC is checked
// against a reference PC (reset address, PC + 4, or the branch target
// formed from the low 16 bits of the fetched word) and the instruction
// word against the loaded image, so one PC update per clock is checked.
module tb_ifetch;
  localparam int unsigned WORDS = 1024;
  logic        clk = 1'b0, rst, npc_sel, zero, load_we;
  logic [31:0] load_addr, load_data, pc, pc_plus4, instr;
  logic [31:0] image [WORDS];
  logic [31:0] model_pc;
  int checks = 0, failures = 0;
  int taken = 0, seq = 0;

  ifetch #(.IMEM_WORDS(WORDS), .RESET_PC(32'h0000_0000)) dut (
    .clk(clk), .rst(rst), .npc_sel(npc_sel), .zero(zero),
    .load_we(load_we), .load_addr(load_addr), .load_data(load_data),
    .pc(pc), .pc_plus4(pc_plus4), .instr(instr)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; load_we = 1'b1; npc_sel = 1'b0; zero = 1'b0;
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      load_addr = 32'(w * 4);
      // Small branch offsets keep the program counter moving around.
      load_data = {16'($urandom), 16'($signed(6'($urandom)))};
      image[w]  = load_data;
    end
    @(negedge clk);
    load_we = 1'b0;
    @(negedge clk);
    rst = 1'b0;
    model_pc = 32'h0;
    for (int i = 0; i < 4000; i++) begin
      npc_sel = 1'($urandom);
      zero    = 1'($urandom);
      #1;
      checks += 3;
      if (pc !== model_pc) begin
        failures++;
        $display("FAIL cycle %0d pc=%h expected %h", i, pc, model_pc);
      end
      if (instr !== image[model_pc[11:2]]) begin
        failures++;
        $display("FAIL cycle %0d instr=%h expected %h", i, instr, image[model_pc[11:2]]);
      end
      if (pc_plus4 !== model_pc + 32'd4) begin
        failures++;
        $display("FAIL cycle %0d pc_plus4=%h", i, pc_plus4);
      end
      if (npc_sel && zero) begin
        model_pc = model_pc + 32'd4 + {{14{image[model_pc[11:2]][15]}}, image[model_pc[11:2]][15:0], 2'b00};
        taken++;
      end else begin
        model_pc = model_pc + 32'd4;
        seq++;
      end
      @(negedge clk);
    end
    // Reset returns the PC to its start address.
    rst = 1'b1;
    @(negedge clk);
    checks++;
    if (pc !== 32'h0) begin
      failures++;
      $display("FAIL reset pc=%h", pc);
    end
    checks++;
    if (taken == 0 || seq == 0) begin
      failures++;
      $display("FAIL branch or sequential fetch never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
