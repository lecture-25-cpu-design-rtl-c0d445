// memory: idealized word memory, used for both the instruction memory and
// the data memory of the single-cycle CPU.
//
// One input bus (data_in), one output bus (data_out) and one address. The
// address is a byte address; bits [1:0] are ignored and the next
// $clog2(WORDS) bits select the word (higher bits wrap around). Reading is
// combinational: data_out follows the address after the access time, with no
// clock involved. Writing is clocked: when write_enable is 1 the addressed
// word takes data_in on the rising edge of clk. The word-aligned byte
// addressing and the size (WORDS, 1024 by default) are this design's choices.
// The contents are not reset.
module memory #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned W     = 32,
  parameter int unsigned AW    = 32
) (
  input  logic          clk,
  input  logic          write_enable,
  input  logic [AW-1:0] address,
  input  logic [W-1:0]  data_in,
  output logic [W-1:0]  data_out
);
  localparam int unsigned IW = $clog2(WORDS);

  logic [W-1:0]  mem [WORDS];
  logic [IW-1:0] index;

  assign index    = address[IW+1:2];
  assign data_out = mem[index];

  always_ff @(posedge clk) begin
    if (write_enable) mem[index] <= data_in;
  end

  // Byte-offset and upper address bits do not select a word.
  logic unused_addr;
  assign unused_addr = ^{address[1:0], address[AW-1:IW+2]};
endmodule
