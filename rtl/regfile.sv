// regfile: register file of NREGS registers of W bits (32 x 32 by default).
//
// Two read ports and one write port, so an instruction can read two
// registers and write a third in one cycle. Reading is combinational: ra
// selects the register driven onto bus_a and rb the one on bus_b. Writing
// is clocked: when we is 1, bus_w is written into register rw on the rising
// edge of clk; the clock plays no part in reading. Because the write lands
// at the end of the cycle, an instruction whose destination is also a source
// reads the old value throughout its own cycle.
//
// Register 0 reads as zero and ignores writes when R0_ZERO is 1 (the
// default), as the MIPS architecture requires. The registers are not reset.
module regfile #(
  parameter int unsigned NREGS   = 32,
  parameter int unsigned W       = 32,
  parameter bit          R0_ZERO = 1'b1,
  localparam int unsigned AW     = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] rw,
  input  logic [W-1:0]  bus_w,
  input  logic [AW-1:0] ra,
  input  logic [AW-1:0] rb,
  output logic [W-1:0]  bus_a,
  output logic [W-1:0]  bus_b
);
  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (we && !(R0_ZERO && rw == '0)) regs[rw] <= bus_w;
  end

  assign bus_a = (R0_ZERO && ra == '0) ? '0 : regs[ra];
  assign bus_b = (R0_ZERO && rb == '0) ? '0 : regs[rb];
endmodule
