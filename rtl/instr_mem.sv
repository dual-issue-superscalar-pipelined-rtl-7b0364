// instr_mem: instruction ROM that delivers one instruction pair per cycle.
//
// DEPTH 32-bit words, loaded from INIT_FILE (hex, one word per line) at
// start-up; words the file does not cover read as zero (NOP). Read is
// combinational: for word address a it returns {mem[a], mem[a+1]}, the
// upper half going to lane 1 and the lower half to lane 2. a+1 wraps within
// the memory. The 64-word size and the two-word read follow the design
// description; the zero fill is this design's choice.
module instr_mem
  import mips_pkg::*;
#(
  parameter int unsigned DEPTH     = 64,
  parameter string       INIT_FILE = "rtl/program.hex",
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic [AW-1:0] a,
  output logic [63:0]   rd
);

  word_t mem [DEPTH];
  logic [AW-1:0] a_next;

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign a_next = a + 1'b1;
  assign rd     = {mem[a], mem[a_next]};

endmodule
