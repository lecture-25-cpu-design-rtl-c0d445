// register: N-bit register with write enable.
//
// Like a D flip-flop, but N bits wide and with a write enable: when we is 1
// the output takes the input on the rising clock edge, when we is 0 the
// output does not change. The synchronous, active-high reset to RESET_VALUE
// is this design's addition so that the program counter starts at a known
// address.
module register #(
  parameter int unsigned      N           = 32,
  parameter logic [N-1:0]     RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= RESET_VALUE;
    else if (we) q <= d;
  end
endmodule
