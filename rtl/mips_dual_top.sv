// mips_dual_top: dual-issue pipelined MIPS processor with its memories.
//
// The core fetches an instruction pair per cycle from a 64-word instruction
// ROM (word address PC[7:2], pair = words a and a+1) and accesses a 64-word
// two-port data RAM from both lanes' memory stages. The program is loaded
// from IMEM_FILE; the default holds a short loop that exercises forwarding,
// a decode-stage branch and a jump. Outputs show each lane's memory-stage
// address, store data and store enable, and its write-back value, enable
// and destination register. Organisation as in the design description; the
// write-back enable and register outputs are this design's additions for
// observation.
module mips_dual_top
  import mips_pkg::*;
#(
  parameter string IMEM_FILE = "rtl/program.hex"
) (
  input  logic     clk,
  input  logic     reset,
  output word_t    writedata1,
  output word_t    writedata2,
  output word_t    dataaddr1,
  output word_t    dataaddr2,
  output logic     memwrite1,
  output logic     memwrite2,
  output word_t    resultw1,
  output word_t    resultw2,
  output logic     regwritew1,
  output logic     regwritew2,
  output reg_idx_t writeregw1,
  output reg_idx_t writeregw2
);

  word_t       pc;
  logic [63:0] instr;
  word_t       readdata1, readdata2;

  mips_dual_core u_core (
    .clk         (clk),
    .reset       (reset),
    .pcf         (pc),
    .instrf      (instr),
    .aluoutm1    (dataaddr1),
    .aluoutm2    (dataaddr2),
    .writedatam1 (writedata1),
    .writedatam2 (writedata2),
    .readdatam1  (readdata1),
    .readdatam2  (readdata2),
    .memwritem1  (memwrite1),
    .memwritem2  (memwrite2),
    .resultw1    (resultw1),
    .resultw2    (resultw2),
    .regwritew1  (regwritew1),
    .regwritew2  (regwritew2),
    .writeregw1  (writeregw1),
    .writeregw2  (writeregw2)
  );

  instr_mem #(.DEPTH(64), .INIT_FILE(IMEM_FILE)) u_imem (
    .a  (pc[7:2]),
    .rd (instr)
  );

  data_mem #(.DEPTH(64)) u_dmem (
    .clk (clk),
    .we1 (memwrite1), .we2 (memwrite2),
    .a1  (dataaddr1), .a2  (dataaddr2),
    .wd1 (writedata1), .wd2 (writedata2),
    .rd1 (readdata1), .rd2 (readdata2)
  );

endmodule
