// regfile: 32 x 32-bit MIPS register file shared by both issue lanes.
//
// Four combinational read ports (rs and rt of each lane's decode-stage
// instruction) and two write ports (one per lane's write-back stage).
// Register 0 always reads as zero. Writes happen on the falling clock edge,
// as in the design description, so an instruction in decode reads in the
// second half of a cycle the value written back in its first half; no
// write-to-read bypass is needed. If both lanes write one register in the
// same cycle, lane 2 (the younger instruction of its pair) wins. There is no
// reset; software writes a register before reading it.
module regfile
  import mips_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic     clk,
  input  logic     we1,
  input  logic     we2,
  input  reg_idx_t ra1,
  input  reg_idx_t ra2,
  input  reg_idx_t ra3,
  input  reg_idx_t ra4,
  input  reg_idx_t wa1,
  input  reg_idx_t wa2,
  input  word_t    wd1,
  input  word_t    wd2,
  output word_t    rd1,
  output word_t    rd2,
  output word_t    rd3,
  output word_t    rd4
);

  word_t rf [NREGS];

  always_ff @(negedge clk) begin
    if (we1) rf[wa1] <= wd1;
    if (we2) rf[wa2] <= wd2;
  end

  assign rd1 = (ra1 != '0) ? rf[ra1] : '0;
  assign rd2 = (ra2 != '0) ? rf[ra2] : '0;
  assign rd3 = (ra3 != '0) ? rf[ra3] : '0;
  assign rd4 = (ra4 != '0) ? rf[ra4] : '0;

endmodule
