// tb_datapath: the datapath driven by a decoder written in this testbench
// (not the design's controller) and by memories modelled here.
//
// Runs tb/prog_hazards.hex, then compares registers and data memory with
// mips_iss_pkg. Also checks that the fetch PC holds during stalls, that the
// pair behind a taken branch is cleared to NOPs in both F/D registers, and
// that stalls occur at all.
module tb_datapath;
  import mips_pkg::*;
  import mips_iss_pkg::*;

  logic clk = 0, reset = 1;
  ctrl_t     ctrl_d [2];
  alu_ctrl_e alucontrol_d [2];
  logic      pcsrc_d1;
  word_t     pcf;
  word_t     instrf [2], instrd [2], aluoutm [2], writedatam [2], readdatam [2], resultw [2];
  logic      equald [2], memwritem [2], regwritew [2];
  reg_idx_t  writeregw [2];
  logic [31:0] imem [64];
  word_t dmem [64];
  int checks = 0, failures = 0, n_stall = 0, n_squash = 0;

  datapath dut (.*);

  always #5 clk = ~clk;

  // independent decode
  function automatic void decode(input word_t ins, output ctrl_t c, output alu_ctrl_e ac);
    c = '0; ac = ALU_ADD;
    case (ins[31:26])
      6'h00: begin
        c.regwrite = 1; c.regdst = 1; c.aluop = ALUOP_FUNCT;
        case (ins[5:0])
          6'h22: ac = ALU_SUB; 6'h24: ac = ALU_AND; 6'h25: ac = ALU_OR; 6'h2a: ac = ALU_SLT;
          default: ac = ALU_ADD;
        endcase
      end
      6'h23: begin c.regwrite = 1; c.alusrc = 1; c.memtoreg = 1; end
      6'h2b: begin c.alusrc = 1; c.memwrite = 1; end
      6'h04: begin c.branch = 1; c.aluop = ALUOP_SUB; ac = ALU_SUB; end
      6'h08: begin c.regwrite = 1; c.alusrc = 1; end
      6'h02: c.jump = 1;
      default: ;
    endcase
  endfunction

  always_comb begin
    for (int l = 0; l < 2; l++) decode(instrd[l], ctrl_d[l], alucontrol_d[l]);
    pcsrc_d1 = ctrl_d[0].branch & equald[0];
    instrf[0] = imem[pcf[7:2]];
    instrf[1] = imem[6'(pcf[7:2] + 1)];
    readdatam[0] = dmem[aluoutm[0][7:2]];
    readdatam[1] = dmem[aluoutm[1][7:2]];
  end

  always @(posedge clk) begin
    if (memwritem[0]) dmem[aluoutm[0][7:2]] <= writedatam[0];
    if (memwritem[1]) dmem[aluoutm[1][7:2]] <= writedatam[1];
  end

  // stall: PC must hold; redirect: next F/D contents must be NOPs
  always @(negedge clk) begin
    word_t pc_before;
    bit stall, redir;
    #2;
    if (!reset) begin
      stall = dut.stallf;
      redir = (pcsrc_d1 || ctrl_d[0].jump) && !stall;
      pc_before = pcf;
      @(posedge clk); #1;
      if (stall) begin
        n_stall++; checks++;
        if (pcf !== pc_before) begin failures++; $display("FAIL PC moved during stall"); end
      end
      if (redir) begin
        n_squash++; checks++;
        if (instrd[0] !== 0 || instrd[1] !== 0) begin failures++; $display("FAIL pair behind redirect not squashed"); end
      end
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mips_iss iss;
    foreach (imem[i]) imem[i] = '0;
    foreach (dmem[i]) dmem[i] = '0;
    $readmemh("tb/prog_hazards.hex", imem);
    iss = new();
    foreach (imem[i]) iss.imem[i] = imem[i];
    iss.run(1000);
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 0;
    repeat (100) @(posedge clk);
    @(negedge clk);
    for (int r = 1; r < 32; r++)
      if (iss.written_r[r]) begin
        checks++;
        if (dut.u_rf.rf[r] !== iss.regs[r]) begin
          failures++; $display("FAIL $%0d = %h exp %h", r, dut.u_rf.rf[r], iss.regs[r]);
        end
      end
    for (int a = 0; a < 64; a++) begin
      checks++;
      if (dmem[a] !== iss.dmem[a]) begin failures++; $display("FAIL mem[%0d]", a); end
    end
    checks++;
    if (n_stall == 0 || n_squash == 0) begin failures++; $display("FAIL no stall or squash seen"); end
    $display("stalls=%0d squashes=%0d", n_stall, n_squash);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
