// tb_addsub: self-checking test of the XOR-inverting adder-subtractor.
// Checks result, carry out and signed overflow of a + b and a - b against
// reference arithmetic for corner cases and random operands.
module tb_addsub;
  localparam int unsigned N = 32;
  logic [N-1:0] a, b, result;
  logic         sub, cout, ovf;
  int checks = 0, failures = 0;

  addsub #(.N(N)) dut (.a(a), .b(b), .sub(sub), .result(result),
                       .carry_out(cout), .overflow(ovf));

  task automatic check(input logic [N-1:0] ta, input logic [N-1:0] tb_, input logic ts);
    logic [N:0]   ref_sum;
    logic         ref_ovf;
    longint       sa, sb, sr;
    a = ta; b = tb_; sub = ts;
    #1;
    sa = longint'($signed(ta));
    sb = longint'($signed(tb_));
    if (ts) begin
      ref_sum = {1'b0, ta} + {1'b0, ~tb_} + 33'd1;
      sr = sa - sb;
    end else begin
      ref_sum = {1'b0, ta} + {1'b0, tb_};
      sr = sa + sb;
    end
    ref_ovf = (sr > 64'sd2147483647) || (sr < -64'sd2147483648);
    checks++;
    if (result !== ref_sum[N-1:0] || cout !== ref_sum[N] || ovf !== ref_ovf) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%b -> %h c=%b v=%b, expected %h c=%b v=%b",
               ta, tb_, ts, result, cout, ovf, ref_sum[N-1:0], ref_sum[N], ref_ovf);
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
    check(32'd5, 32'd3, 1'b1);
    check(32'd3, 32'd5, 1'b1);
    check(32'd0, 32'd0, 1'b1);
    check(32'h8000_0000, 32'd1, 1'b1);
    check(32'h7fff_ffff, 32'd1, 1'b0);
    check(32'hffff_ffff, 32'd1, 1'b0);
    check(32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int i = 0; i < 2000; i++) check($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
