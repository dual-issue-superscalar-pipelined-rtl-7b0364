// mips_dual_core: the dual-issue MIPS processor without its memories.
//
// Two identical controllers decode the two decode-stage instructions of the
// pair held in the datapath's F/D registers and hand their control words
// back to the datapath in the same cycle. Lane 1's branch decision (BEQ and
// equal operands) and jump steer the PC; lane 2's are not used, as in the
// design description. instrf is the fetched pair {lane 1, lane 2}.
// Memory side: see datapath.
module mips_dual_core
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  output word_t       pcf,
  input  logic [63:0] instrf,
  output word_t       aluoutm1,
  output word_t       aluoutm2,
  output word_t       writedatam1,
  output word_t       writedatam2,
  input  word_t       readdatam1,
  input  word_t       readdatam2,
  output logic        memwritem1,
  output logic        memwritem2,
  output word_t       resultw1,
  output word_t       resultw2,
  output logic        regwritew1,
  output logic        regwritew2,
  output reg_idx_t    writeregw1,
  output reg_idx_t    writeregw2
);

  ctrl_t     ctrl_d       [2];
  alu_ctrl_e alucontrol_d [2];
  logic      pcsrc_d      [2];
  logic      equald       [2];
  word_t     instrd       [2];
  word_t     instrf_l     [2];
  word_t     aluoutm      [2];
  word_t     writedatam   [2];
  logic      memwritem    [2];
  word_t     readdatam    [2];
  word_t     resultw      [2];
  logic      regwritew    [2];
  reg_idx_t  writeregw    [2];

  assign instrf_l[0]  = instrf[63:32];
  assign instrf_l[1]  = instrf[31:0];
  assign readdatam[0] = readdatam1;
  assign readdatam[1] = readdatam2;

  for (genvar g = 0; g < 2; g++) begin : g_ctrl
    controller u_ctrl (
      .op         (instrd[g][31:26]),
      .funct      (instrd[g][5:0]),
      .equald     (equald[g]),
      .ctrl       (ctrl_d[g]),
      .alucontrol (alucontrol_d[g]),
      .pcsrc      (pcsrc_d[g])
    );
  end

  datapath u_dp (
    .clk          (clk),
    .reset        (reset),
    .ctrl_d       (ctrl_d),
    .alucontrol_d (alucontrol_d),
    .pcsrc_d1     (pcsrc_d[0]),
    .pcf          (pcf),
    .instrf       (instrf_l),
    .instrd       (instrd),
    .equald       (equald),
    .aluoutm      (aluoutm),
    .writedatam   (writedatam),
    .memwritem    (memwritem),
    .readdatam    (readdatam),
    .resultw      (resultw),
    .regwritew    (regwritew),
    .writeregw    (writeregw)
  );

  assign aluoutm1    = aluoutm[0];
  assign aluoutm2    = aluoutm[1];
  assign writedatam1 = writedatam[0];
  assign writedatam2 = writedatam[1];
  assign memwritem1  = memwritem[0];
  assign memwritem2  = memwritem[1];
  assign resultw1    = resultw[0];
  assign resultw2    = resultw[1];
  assign regwritew1  = regwritew[0];
  assign regwritew2  = regwritew[1];
  assign writeregw1  = writeregw[0];
  assign writeregw2  = writeregw[1];

endmodule
