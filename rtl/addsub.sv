// addsub: N-bit adder-subtractor.
//
// With sub = 0 the result is a + b; with sub = 1 it is a - b, formed as
// a + ~b + 1. Each bit of b passes an XOR gate with sub, which acts as a
// conditional inverter, and sub is also the carry into the lowest of the N
// one-bit adders (the adder module). carry_out is the raw carry of the top
// bit (for subtraction, 1 means no borrow); overflow is the signed two's
// complement overflow. Purely combinational.
module addsub #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sub,
  output logic [N-1:0] result,
  output logic         carry_out,
  output logic         overflow
);
  logic [N-1:0] b_x;

  assign b_x = b ^ {N{sub}};

  adder #(.N(N)) u_add (
    .a        (a),
    .b        (b_x),
    .carry_in (sub),
    .sum      (result),
    .carry_out(carry_out)
  );

  assign overflow = (a[N-1] == b_x[N-1]) && (result[N-1] != a[N-1]);
endmodule
