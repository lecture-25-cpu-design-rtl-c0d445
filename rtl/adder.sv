// adder: N-bit adder with carry in and carry out (32 bits by default).
//
// Sum = A + B + CarryIn, CarryOut is the carry out of the top bit. It is a
// ripple chain of N one-bit full adders, the structure the adder-subtractor
// is described with; the ripple form is this design's choice, a synthesis
// tool may restructure it. Purely combinational, no clock.
module adder #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         carry_in,
  output logic [N-1:0] sum,
  output logic         carry_out
);
  logic [N:0] c;
  assign c[0] = carry_in;

  for (genvar i = 0; i < N; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign carry_out = c[N];
endmodule
