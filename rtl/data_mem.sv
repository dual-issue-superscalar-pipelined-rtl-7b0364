// data_mem: data RAM shared by both issue lanes.
//
// DEPTH 32-bit words, word addressed with byte-address bits [AW+1:2]. Two
// combinational read ports and two write ports that write on the rising
// edge, one of each per lane. If both lanes store to one word in the same
// cycle, lane 2's data is kept (it is the younger instruction). Size, port
// count and timing follow the design description. No reset of contents.
module data_mem
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic  clk,
  input  logic  we1,
  input  logic  we2,
  input  word_t a1,
  input  word_t a2,
  input  word_t wd1,
  input  word_t wd2,
  output word_t rd1,
  output word_t rd2
);

  word_t ram [DEPTH];

  assign rd1 = ram[a1[AW+1:2]];
  assign rd2 = ram[a2[AW+1:2]];

  always_ff @(posedge clk) begin
    if (we1) ram[a1[AW+1:2]] <= wd1;
    if (we2) ram[a2[AW+1:2]] <= wd2;
  end

endmodule
