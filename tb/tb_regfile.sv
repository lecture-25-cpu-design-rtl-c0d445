// tb_regfile: self-checking test of the 32 x 32-bit register file.
// A reference array tracks every write. Each cycle a random write (or none)
// and two random reads are applied; the reads are checked before the edge
// (combinational, showing the old value even when rw equals ra or rb) and
// after it. Register 0 must read as zero whatever is written to it.
module tb_regfile;
  logic        clk = 1'b0, we;
  logic [4:0]  rw, ra, rb;
  logic [31:0] bus_w, bus_a, bus_b;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  int same_reg = 0;

  regfile #(.NREGS(32), .W(32)) dut (
    .clk(clk), .we(we), .rw(rw), .bus_w(bus_w), .ra(ra), .rb(rb),
    .bus_a(bus_a), .bus_b(bus_b)
  );

  always #5 clk = ~clk;

  task automatic check_reads(input string when);
    checks += 2;
    if (bus_a !== model[ra]) begin
      failures++;
      $display("FAIL %s busA r%0d=%h expected %h", when, ra, bus_a, model[ra]);
    end
    if (bus_b !== model[rb]) begin
      failures++;
      $display("FAIL %s busB r%0d=%h expected %h", when, rb, bus_b, model[rb]);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Fill every register once so nothing uninitialised is read.
    we = 1'b1;
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      rw = 5'(r); bus_w = $urandom; ra = 5'(r); rb = 5'(r);
      model[r] = (r == 0) ? 32'd0 : bus_w;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we    = 1'($urandom);
      rw    = 5'($urandom);
      bus_w = $urandom;
      ra    = (i % 4 == 0) ? rw : 5'($urandom);
      rb    = 5'($urandom);
      if (we && (ra == rw || rb == rw) && rw != 0) same_reg++;
      #1;
      check_reads("before edge");
      @(posedge clk);
      if (we && rw != 0) model[rw] = bus_w;
      #1;
      check_reads("after edge");
    end
    checks++;
    if (same_reg == 0) begin
      failures++;
      $display("FAIL no write to a register being read was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
