// tb_mips_single_cycle: end-to-end test of the single-cycle MIPS-lite CPU at
// its default sizes (1024-word instruction and data memories).
//
// The testbench assembles a program in memory, loads it through the
// instruction load port while reset is held, and runs it against its own
// instruction-set model. Every clock cycle it checks that the CPU is at the
// model's PC and fetched the right word, and that the register write and
// data memory write it is about to commit (enable, address, data) are the
// model's; so each instruction is checked to complete in exactly one cycle.
// The program ends by storing every register and loading every data word it
// used, so the final state is compared through the same ports.
//
// The program: ORI seeds every register; SW fills 128 data words; a
// pseudo-random block of ADDU, SUBU, ORI, LW, SW and forward BEQ follows
// (registers 28-30 are reserved: 28 holds 1, 29 is a loop counter, 30 a
// base address of 0x100 used with negative and positive offsets); a
// countdown loop with a backward BEQ; the store/load epilogue; and a BEQ to
// itself that ends the run.
// The test counts each instruction kind, taken and not-taken and backward
// branches, writes to register 0, instructions whose destination is also a
// source, and loads of a word stored earlier, and fails if any never occurs.
module tb_mips_single_cycle;
  localparam int unsigned IWORDS  = 1024;  // defaults of the CPU
  localparam int unsigned DWORDS  = 1024;
  localparam int unsigned N_RAND  = 600;
  localparam logic [31:0] HALT    = {6'h04, 5'd0, 5'd0, 16'hffff};  // beq r0,r0,-1

  logic        clk = 1'b0, rst;
  logic        load_we;
  logic [31:0] load_addr, load_data;
  logic [31:0] pc, instr, reg_wdata, mem_addr, mem_wdata;
  logic [4:0]  reg_waddr;
  logic        reg_we, mem_we, branch_taken, illegal;

  mips_single_cycle dut (
    .clk(clk), .rst(rst),
    .imem_load_we(load_we), .imem_load_addr(load_addr), .imem_load_data(load_data),
    .pc(pc), .instr(instr),
    .reg_we(reg_we), .reg_waddr(reg_waddr), .reg_wdata(reg_wdata),
    .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata),
    .branch_taken(branch_taken), .illegal(illegal)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- program assembly ----------------
  logic [31:0] prog [$];

  function automatic logic [31:0] r_type(input int rs, input int rt, input int rd, input logic [5:0] fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] i_type(input logic [5:0] op, input int rs, input int rt, input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  function automatic int rand_dst();
    int r;
    do r = $urandom_range(31); while (r >= 28 && r <= 30);
    return r;
  endfunction

  task automatic build_program();
    int k, skip;
    for (int r = 1; r < 32; r++) prog.push_back(i_type(6'h0d, 0, r, $urandom));
    prog.push_back(i_type(6'h0d, 0, 28, 1));
    prog.push_back(i_type(6'h0d, 0, 30, 32'h100));
    // Make some registers carry values in the upper half as well.
    for (int r = 1; r < 8; r++) prog.push_back(r_type(r, r + 8, r, 6'h23));
    for (int w = 0; w < 128; w++) prog.push_back(i_type(6'h2b, 0, w % 28, w * 4));
    k = 0;
    while (k < N_RAND) begin
      case ($urandom_range(9))
        0, 1: prog.push_back(r_type($urandom_range(31), $urandom_range(31), rand_dst(), 6'h21));
        2:    prog.push_back(r_type($urandom_range(31), $urandom_range(31), rand_dst(), 6'h23));
        3:    begin  // destination equals a source
                int d = rand_dst();
                prog.push_back(r_type(d, $urandom_range(31), d, ($urandom_range(1) != 0) ? 6'h21 : 6'h23));
              end
        4:    prog.push_back(i_type(6'h0d, $urandom_range(31), rand_dst(), $urandom));
        5:    prog.push_back(($urandom_range(1) != 0)
                ? i_type(6'h23, 30, rand_dst(), int'($urandom_range(127)) * 4 - 256)
                : i_type(6'h23, 0, rand_dst(), int'($urandom_range(127)) * 4));
        6:    prog.push_back(($urandom_range(1) != 0)
                ? i_type(6'h2b, 30, $urandom_range(31), int'($urandom_range(127)) * 4 - 256)
                : i_type(6'h2b, 0, $urandom_range(31), int'($urandom_range(127)) * 4));
        7:    begin  // forward branch, sometimes on one register twice
                skip = $urandom_range(3);
                if (k + 1 + skip < N_RAND) begin
                  int a = $urandom_range(31);
                  prog.push_back(i_type(6'h04, a, ($urandom_range(2) == 0) ? a : $urandom_range(31), skip));
                end else prog.push_back(r_type(1, 2, 3, 6'h21));
              end
        8:    prog.push_back(r_type($urandom_range(31), $urandom_range(31), 0, 6'h21));  // write to r0
        default: prog.push_back(i_type(6'h2b, 0, $urandom_range(31), 0));
      endcase
      k++;
    end
    // Countdown loop: r29 = 5; loop: r29 = r29 - r28; beq r29,r0,+1; beq r0,r0,loop
    prog.push_back(i_type(6'h0d, 0, 29, 5));
    prog.push_back(r_type(29, 28, 29, 6'h23));
    prog.push_back(i_type(6'h04, 29, 0, 1));
    prog.push_back(i_type(6'h04, 0, 0, -3));
    prog.push_back(i_type(6'h2b, 0, 29, 512));
    // Epilogue: store every register, then load back every data word used,
    // so the final architectural state passes the checked write ports.
    for (int r = 1; r < 32; r++) prog.push_back(i_type(6'h2b, 0, r, 768 + 4 * r));
    for (int w = 0; w <= 128; w++) prog.push_back(i_type(6'h23, 0, 1, 4 * w));
    prog.push_back(HALT);
  endtask

  // ---------------- instruction-set model ----------------
  logic [31:0] R [32];
  logic [31:0] M [DWORDS];
  bit          Mvalid [DWORDS];
  bit          Mstored [DWORDS];
  logic [31:0] mpc;

  // Mechanism counters.
  int n_addu, n_subu, n_ori, n_lw, n_sw, n_beq_t, n_beq_nt, n_back, n_r0, n_same, n_ld_st, n_neg_off;

  task automatic step_and_check(input int cyc);
    logic [31:0] iw, ext_s, ext_z, addr, exp_wd, nxt;
    logic [5:0]  op, fn;
    int          rs, rt, rd;
    bit          exp_rwe, exp_mwe;
    int          exp_wa;

    iw = prog[mpc[31:2]];
    op = iw[31:26]; rs = int'(iw[25:21]); rt = int'(iw[20:16]); rd = int'(iw[15:11]); fn = iw[5:0];
    ext_s = {{16{iw[15]}}, iw[15:0]};
    ext_z = {16'h0, iw[15:0]};
    exp_rwe = 0; exp_mwe = 0; exp_wa = 0; exp_wd = 'x; addr = '0;
    nxt = mpc + 4;

    checks += 2;
    if (pc !== mpc)  begin failures++; $display("FAIL cycle %0d pc=%h expected %h", cyc, pc, mpc); end
    if (instr !== iw) begin failures++; $display("FAIL cycle %0d instr=%h expected %h", cyc, instr, iw); end

    case (op)
      6'h00: begin
        exp_rwe = 1; exp_wa = rd;
        if (fn == 6'h21) begin exp_wd = R[rs] + R[rt]; n_addu++; end
        else             begin exp_wd = R[rs] - R[rt]; n_subu++; end
        if (rd == 0) n_r0++;
        if (rd != 0 && (rd == rs || rd == rt)) n_same++;
      end
      6'h0d: begin exp_rwe = 1; exp_wa = rt; exp_wd = R[rs] | ext_z; n_ori++; end
      6'h23: begin
        addr = R[rs] + ext_s;
        exp_rwe = 1; exp_wa = rt;
        if (!Mvalid[addr[11:2]]) begin
          failures++; $display("TEST ERROR: load of an unwritten word %h", addr);
        end
        exp_wd = M[addr[11:2]];
        if (Mstored[addr[11:2]]) n_ld_st++;
        if (iw[15]) n_neg_off++;
        n_lw++;
      end
      6'h2b: begin addr = R[rs] + ext_s; exp_mwe = 1; n_sw++; end
      6'h04: begin
        if (R[rs] == R[rt]) begin
          nxt = mpc + 4 + {ext_s[29:0], 2'b00};
          if (iw != HALT) begin
            n_beq_t++;
            if (iw[15]) n_back++;
          end
        end else n_beq_nt++;
      end
      default: begin failures++; $display("TEST ERROR: unknown op %h", op); end
    endcase

    checks += 3;
    if (reg_we !== exp_rwe) begin
      failures++; $display("FAIL cycle %0d reg_we=%b expected %b (instr %h)", cyc, reg_we, exp_rwe, iw);
    end else if (exp_rwe && (reg_waddr !== 5'(exp_wa) || reg_wdata !== exp_wd)) begin
      failures++;
      $display("FAIL cycle %0d reg write r%0d=%h expected r%0d=%h (instr %h)",
               cyc, reg_waddr, reg_wdata, exp_wa, exp_wd, iw);
    end
    if (mem_we !== exp_mwe) begin
      failures++; $display("FAIL cycle %0d mem_we=%b expected %b", cyc, mem_we, exp_mwe);
    end else if (exp_mwe && (mem_addr !== addr || mem_wdata !== R[rt])) begin
      failures++;
      $display("FAIL cycle %0d store [%h]=%h expected [%h]=%h", cyc, mem_addr, mem_wdata, addr, R[rt]);
    end
    if (branch_taken !== (op == 6'h04 && R[rs] == R[rt])) begin
      failures++; $display("FAIL cycle %0d branch_taken=%b", cyc, branch_taken);
    end
    if (illegal !== 1'b0) begin
      failures++; $display("FAIL cycle %0d illegal flagged for %h", cyc, iw);
    end

    // Commit in the model.
    if (exp_rwe && exp_wa != 0) R[exp_wa] = exp_wd;
    if (exp_mwe) begin
      M[addr[11:2]] = R[rt];
      Mvalid[addr[11:2]] = 1;
      if (mpc >= 32'(4 * (31 + 2 + 7 + 128))) Mstored[addr[11:2]] = 1;
    end
    mpc = nxt;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles, retired;
    build_program();
    if (prog.size() > IWORDS) $fatal(1, "program too large");
    foreach (R[i]) R[i] = '0;
    foreach (Mvalid[i]) begin Mvalid[i] = 0; Mstored[i] = 0; end

    rst = 1'b1; load_we = 1'b1;
    foreach (prog[i]) begin
      load_addr = 32'(i * 4);
      load_data = prog[i];
      @(negedge clk);
    end
    load_we = 1'b0; load_addr = '0; load_data = '0;
    @(negedge clk);
    checks++;
    if (reg_we || mem_we) begin failures++; $display("FAIL write enabled during reset"); end
    rst = 1'b0;
    mpc = 32'h0;

    cycles = 0; retired = 0;
    while (prog[mpc[31:2]] != HALT && cycles < 20000) begin
      #1;
      step_and_check(cycles);
      retired++;
      @(negedge clk);
      cycles++;
    end
    // The halt loop keeps the PC in place.
    repeat (3) begin
      #1;
      checks++;
      if (pc !== mpc || !branch_taken) begin
        failures++; $display("FAIL halt loop pc=%h expected %h", pc, mpc);
      end
      @(negedge clk);
    end

    // One instruction per cycle.
    checks++;
    if (retired != cycles || cycles == 0) begin
      failures++; $display("FAIL %0d instructions in %0d cycles", retired, cycles);
    end

    checks++;
    if (R[29] !== 32'd0 || M[128] !== 32'd0) begin
      failures++; $display("FAIL countdown loop did not end at zero");
    end

    $display("instructions %0d in %0d cycles: addu %0d subu %0d ori %0d lw %0d sw %0d",
             retired, cycles, n_addu, n_subu, n_ori, n_lw, n_sw);
    $display("beq taken %0d not taken %0d backward %0d; r0 writes %0d; rd==source %0d; load of stored word %0d; negative offset %0d",
             n_beq_t, n_beq_nt, n_back, n_r0, n_same, n_ld_st, n_neg_off);
    begin
      int counts[12];
      counts = '{n_addu, n_subu, n_ori, n_lw, n_sw, n_beq_t, n_beq_nt, n_back,
                         n_r0, n_same, n_ld_st, n_neg_off};
      foreach (counts[i]) begin
        checks++;
        if (counts[i] == 0) begin failures++; $display("FAIL mechanism %0d never exercised", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
