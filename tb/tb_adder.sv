// tb_adder: self-checking test of the 32-bit adder with carry in and out.
// Drives corner cases and random operands and compares {carry_out, sum}
// with a 33-bit reference sum computed in the testbench.
module tb_adder;
  localparam int unsigned N = 32;
  logic [N-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  adder #(.N(N)) dut (.a(a), .b(b), .carry_in(cin), .sum(sum), .carry_out(cout));

  task automatic check(input logic [N-1:0] ta, input logic [N-1:0] tb_, input logic tc);
    logic [N:0] exp;
    a = ta; b = tb_; cin = tc;
    #1;
    exp = {1'b0, ta} + {1'b0, tb_} + {{N{1'b0}}, tc};
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b -> %b_%h, expected %h", ta, tb_, tc, cout, sum, exp);
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
    check('0, '0, 1'b0);
    check('0, '0, 1'b1);
    check('1, 32'd1, 1'b0);
    check('1, '1, 1'b1);
    check(32'h7fff_ffff, 32'd1, 1'b0);
    check(32'h8000_0000, 32'h8000_0000, 1'b0);
    check(32'h0000_0004, 32'h0000_1000, 1'b0);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
