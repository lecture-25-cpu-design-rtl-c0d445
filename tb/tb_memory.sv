// tb_memory: self-checking test of the idealized memory (word addressed by
// byte address, combinational read, clocked write). Writes every word, then
// mixes random writes and reads, checking that a read follows the address
// with no clock, and that a write only lands at the rising edge.
module tb_memory;
  localparam int unsigned WORDS = 1024;
  logic        clk = 1'b0, we;
  logic [31:0] addr, din, dout;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  memory #(.WORDS(WORDS), .W(32), .AW(32)) dut (
    .clk(clk), .write_enable(we), .address(addr), .data_in(din), .data_out(dout)
  );

  always #5 clk = ~clk;

  task automatic check_read(input string when);
    checks++;
    if (dout !== model[addr[11:2]]) begin
      failures++;
      $display("FAIL %s addr=%h dout=%h expected %h", when, addr, dout, model[addr[11:2]]);
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
    we = 1'b1;
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      addr = 32'(w * 4); din = $urandom ^ 32'(w);
      model[w] = din;
    end
    @(negedge clk);
    we = 1'b0;
    // Combinational reads: several addresses within one clock phase.
    for (int i = 0; i < 200; i++) begin
      addr = {20'($urandom), 10'($urandom), 2'($urandom)};
      #1;
      check_read("async read");
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we   = 1'($urandom);
      addr = {20'd0, 10'($urandom), 2'b00};
      din  = $urandom;
      #1;
      check_read("before edge");
      @(posedge clk);
      if (we) model[addr[11:2]] = din;
      #1;
      check_read("after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
