// datapath: five-stage (F, D, E, M, W) pipelined datapath with two issue
// lanes.
//
// Each cycle the fetch stage reads an aligned instruction pair: the word at
// the PC goes down lane 1 and the next word down lane 2. Both lanes have
// their own F/D, D/E, E/M and M/W registers, decode-stage branch
// comparator, two forwarding multiplexers and ALU; they share the next-PC
// logic, a 4-read/2-write register file and the hazard unit. Only lane 1
// can branch or jump; the lane-2 instruction of the same pair is already in
// decode and always completes (it behaves like a branch delay slot), while
// the pair fetched behind the branch is squashed in the F/D registers.
// The E-stage operand of either lane can come from the register file, from
// either lane's M-stage ALU result or from either lane's write-back result.
// Lane arrays: index 0 is lane 1, index 1 is lane 2.
//
// Interface: ctrl_d/alucontrol_d/pcsrc_d come back combinationally from the
// per-lane controllers, which decode instrd. pcf/instrf connect to the
// instruction memory, aluoutm/writedatam/memwritem/readdatam to the data
// memory (combinational read, write at the rising edge). resultw, regwritew
// and writeregw show what each lane writes back this cycle.
// The stage structure follows the design description; holding both lanes
// together on a stall is this design's choice (see hazard_unit).
module datapath
  import mips_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  ctrl_t       ctrl_d       [2],
  input  alu_ctrl_e   alucontrol_d [2],
  input  logic        pcsrc_d1,
  output word_t       pcf,
  input  word_t       instrf       [2],
  output word_t       instrd       [2],
  output logic        equald       [2],
  output word_t       aluoutm      [2],
  output word_t       writedatam   [2],
  output logic        memwritem    [2],
  input  word_t       readdatam    [2],
  output word_t       resultw      [2],
  output logic        regwritew    [2],
  output reg_idx_t    writeregw    [2]
);

  // Hazard-unit signals
  logic     stallf;
  logic     stalld    [2];
  logic     flushe    [2];
  logic     forwardad [2];
  logic     forwardbd [2];
  fwd_sel_e forwardae [2];
  fwd_sel_e forwardbe [2];

  // Per-lane stage signals
  word_t    pcd       [2];
  word_t    rda       [2];
  word_t    rdb       [2];
  word_t    signimmd  [2];
  de_t      de_d      [2];
  de_t      de_e      [2];
  em_t      em_e      [2];
  em_t      em_m      [2];
  mw_t      mw_m      [2];
  mw_t      mw_w      [2];
  logic     branchd   [2];
  reg_idx_t rsd       [2];
  reg_idx_t rtd       [2];
  reg_idx_t rse       [2];
  reg_idx_t rte       [2];
  reg_idx_t writerege [2];
  logic     regwritee [2];
  logic     memtorege [2];
  reg_idx_t writeregm [2];
  logic     regwritem [2];
  logic     memtoregm [2];

  word_t pcplus4f, pcplus8f;
  logic  redirect;

  // ---------------- Fetch ----------------
  assign redirect = pcsrc_d1 | ctrl_d[0].jump;

  next_pc u_pc (
    .clk      (clk),
    .reset    (reset),
    .en       (~stallf),
    .pcsrc    (pcsrc_d1),
    .jump     (ctrl_d[0].jump),
    .pcplus4d (pcd[0]),
    .signimmd (signimmd[0]),
    .jaddr    (instrd[0][25:0]),
    .pcf      (pcf),
    .pcplus4f (pcplus4f),
    .pcplus8f (pcplus8f)
  );

  // ---------------- Register file (decode read, write-back write) ----------------
  regfile u_rf (
    .clk (clk),
    .we1 (regwritew[0]), .we2 (regwritew[1]),
    .ra1 (rsd[0]), .ra2 (rsd[1]), .ra3 (rtd[0]), .ra4 (rtd[1]),
    .wa1 (writeregw[0]), .wa2 (writeregw[1]),
    .wd1 (resultw[0]),   .wd2 (resultw[1]),
    .rd1 (rda[0]), .rd2 (rda[1]), .rd3 (rdb[0]), .rd4 (rdb[1])
  );

  for (genvar g = 0; g < 2; g++) begin : g_lane
    localparam int OTH = 1 - g;
    word_t srcae, srcbe, writedatae, aluoute;
    logic  zero_unused;

    // F/D: lane 1 carries PC+4 (its branch base), lane 2 carries PC+8.
    pipe_reg_fd u_fd (
      .clk    (clk),
      .reset  (reset),
      .en     (~stalld[g]),
      .clr    (redirect),
      .instrf (instrf[g]),
      .pcf_in ((g == 0) ? pcplus4f : pcplus8f),
      .instrd (instrd[g]),
      .pcd    (pcd[g])
    );

    // ---------------- Decode ----------------
    assign rsd[g]      = instrd[g][25:21];
    assign rtd[g]      = instrd[g][20:16];
    assign signimmd[g] = {{16{instrd[g][15]}}, instrd[g][15:0]};
    assign branchd[g]  = ctrl_d[g].branch;

    branch_compare u_eq (
      .rd_a    (rda[g]),
      .rd_b    (rdb[g]),
      .aluoutm (em_m[g].aluout),
      .fwd_a   (forwardad[g]),
      .fwd_b   (forwardbd[g]),
      .equal   (equald[g])
    );

    always_comb begin
      de_d[g].regwrite   = ctrl_d[g].regwrite;
      de_d[g].memtoreg   = ctrl_d[g].memtoreg;
      de_d[g].memwrite   = ctrl_d[g].memwrite;
      de_d[g].alucontrol = alucontrol_d[g];
      de_d[g].alusrc     = ctrl_d[g].alusrc;
      de_d[g].regdst     = ctrl_d[g].regdst;
      de_d[g].srca       = rda[g];
      de_d[g].srcb       = rdb[g];
      de_d[g].rs         = instrd[g][25:21];
      de_d[g].rt         = instrd[g][20:16];
      de_d[g].rd         = instrd[g][15:11];
      de_d[g].signimm    = signimmd[g];
      de_d[g].shamt      = instrd[g][10:6];
    end

    pipe_reg_de u_de (.clk(clk), .reset(reset), .clr(flushe[g]), .d(de_d[g]), .e(de_e[g]));

    // ---------------- Execute ----------------
    assign rse[g]       = de_e[g].rs;
    assign rte[g]       = de_e[g].rt;
    assign writerege[g] = de_e[g].regdst ? de_e[g].rd : de_e[g].rt;
    assign regwritee[g] = de_e[g].regwrite;
    assign memtorege[g] = de_e[g].memtoreg;

    fwd_mux5 #(.WIDTH(32)) u_fwda (
      .d0 (de_e[g].srca), .d1 (resultw[g]), .d2 (em_m[g].aluout),
      .d3 (resultw[OTH]), .d4 (em_m[OTH].aluout),
      .s  (forwardae[g]), .y (srcae)
    );
    fwd_mux5 #(.WIDTH(32)) u_fwdb (
      .d0 (de_e[g].srcb), .d1 (resultw[g]), .d2 (em_m[g].aluout),
      .d3 (resultw[OTH]), .d4 (em_m[OTH].aluout),
      .s  (forwardbe[g]), .y (writedatae)
    );
    assign srcbe = de_e[g].alusrc ? de_e[g].signimm : writedatae;

    alu u_alu (
      .a (srcae), .b (srcbe), .f (de_e[g].alucontrol), .shamt (de_e[g].shamt),
      .y (aluoute), .zero (zero_unused)
    );

    always_comb begin
      em_e[g].regwrite  = de_e[g].regwrite;
      em_e[g].memtoreg  = de_e[g].memtoreg;
      em_e[g].memwrite  = de_e[g].memwrite;
      em_e[g].aluout    = aluoute;
      em_e[g].writedata = writedatae;
      em_e[g].writereg  = writerege[g];
    end

    pipe_reg_em u_em (.clk(clk), .reset(reset), .e(em_e[g]), .m(em_m[g]));

    // ---------------- Memory ----------------
    assign aluoutm[g]    = em_m[g].aluout;
    assign writedatam[g] = em_m[g].writedata;
    assign memwritem[g]  = em_m[g].memwrite;
    assign writeregm[g]  = em_m[g].writereg;
    assign regwritem[g]  = em_m[g].regwrite;
    assign memtoregm[g]  = em_m[g].memtoreg;

    always_comb begin
      mw_m[g].regwrite = em_m[g].regwrite;
      mw_m[g].memtoreg = em_m[g].memtoreg;
      mw_m[g].readdata = readdatam[g];
      mw_m[g].aluout   = em_m[g].aluout;
      mw_m[g].writereg = em_m[g].writereg;
    end

    pipe_reg_mw u_mw (.clk(clk), .reset(reset), .m(mw_m[g]), .w(mw_w[g]));

    // ---------------- Write-back ----------------
    assign resultw[g]   = mw_w[g].memtoreg ? mw_w[g].readdata : mw_w[g].aluout;
    assign regwritew[g] = mw_w[g].regwrite;
    assign writeregw[g] = mw_w[g].writereg;
  end

  hazard_unit u_hz (
    .branchd   (branchd),
    .rsd       (rsd),       .rtd       (rtd),
    .rse       (rse),       .rte       (rte),
    .writerege (writerege), .regwritee (regwritee), .memtorege (memtorege),
    .writeregm (writeregm), .regwritem (regwritem), .memtoregm (memtoregm),
    .writeregw (writeregw), .regwritew (regwritew),
    .stallf    (stallf),    .stalld    (stalld),    .flushe    (flushe),
    .forwardad (forwardad), .forwardbd (forwardbd),
    .forwardae (forwardae), .forwardbe (forwardbe)
  );

endmodule
