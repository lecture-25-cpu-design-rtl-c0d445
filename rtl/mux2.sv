// mux2: two-input multiplexer of W-bit words (32 bits by default).
// y = sel ? b : a; that sel = 1 picks b is this design's convention.
// Purely combinational.
module mux2 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sel,
  output logic [W-1:0] y
);
  assign y = sel ? b : a;
endmodule
