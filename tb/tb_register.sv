// tb_register: self-checking test of the N-bit register with write enable.
// Checks reset, that the output follows the input only at a rising edge
// with we = 1, and that it holds its value with we = 0.
module tb_register;
  localparam logic [31:0] RV = 32'h0040_0000;
  logic        clk = 1'b0, rst, we;
  logic [31:0] d, q, model;
  int checks = 0, failures = 0;

  register #(.N(32), .RESET_VALUE(RV)) dut (.clk(clk), .rst(rst), .we(we), .d(d), .q(q));

  always #5 clk = ~clk;

  task automatic expect_q(input logic [31:0] e, input string what);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, e);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = 1'b0; d = '0;
    @(negedge clk);
    expect_q(RV, "reset");
    rst = 1'b0;
    model = RV;
    for (int i = 0; i < 1000; i++) begin
      we = 1'($urandom);
      d  = $urandom;
      #2;
      expect_q(model, "no change before the edge");
      @(posedge clk);
      if (we) model = d;
      @(negedge clk);
      expect_q(model, we ? "load" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
