// tb_mips_dual_core: the core with memories modelled in this testbench.
//
// The instruction image (tb/prog_hazards.hex) and a 64-word data array are
// held here; the pair {mem[pc/4], mem[pc/4+1]} is fed to the core and its
// stores are applied at the rising edge. After the program reaches its halt
// loop the architectural registers and the data array are compared with
// mips_iss_pkg, and the write-back trace is checked to be in program order:
// every register the model writes is written last with the model's value.
module tb_mips_dual_core;
  import mips_pkg::*;
  import mips_iss_pkg::*;

  logic clk = 0, reset = 1;
  word_t pcf, aluoutm1, aluoutm2, writedatam1, writedatam2, readdatam1, readdatam2, resultw1, resultw2;
  logic [63:0] instrf;
  logic memwritem1, memwritem2, regwritew1, regwritew2;
  reg_idx_t writeregw1, writeregw2;
  logic [31:0] imem [64];
  word_t dmem [64];
  word_t lastw [32];
  bit    seen [32];
  int checks = 0, failures = 0;

  mips_dual_core dut (.*);

  always #5 clk = ~clk;

  assign instrf     = {imem[pcf[7:2]], imem[6'(pcf[7:2] + 1)]};
  assign readdatam1 = dmem[aluoutm1[7:2]];
  assign readdatam2 = dmem[aluoutm2[7:2]];

  always @(posedge clk) begin
    if (memwritem1) dmem[aluoutm1[7:2]] <= writedatam1;
    if (memwritem2) dmem[aluoutm2[7:2]] <= writedatam2;
  end

  // record the last value written to each register, lane 2 after lane 1
  always @(negedge clk) begin
    if (!reset) begin
      if (regwritew1 && writeregw1 != 0) begin lastw[writeregw1] = resultw1; seen[writeregw1] = 1; end
      if (regwritew2 && writeregw2 != 0) begin lastw[writeregw2] = resultw2; seen[writeregw2] = 1; end
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
    foreach (seen[i]) seen[i] = 0;
    $readmemh("tb/prog_hazards.hex", imem);
    iss = new();
    foreach (imem[i]) iss.imem[i] = imem[i];
    iss.run(1000);
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 0;
    repeat (100) @(posedge clk);
    @(negedge clk);
    for (int r = 1; r < 32; r++) begin
      checks++;
      if (seen[r] != iss.written_r[r]) begin
        failures++;
        $display("FAIL $%0d written by core=%0d by model=%0d", r, seen[r], iss.written_r[r]);
      end else if (seen[r] && (lastw[r] !== iss.regs[r] || dut.u_dp.u_rf.rf[r] !== iss.regs[r])) begin
        failures++;
        $display("FAIL $%0d = %h, expected %h", r, lastw[r], iss.regs[r]);
      end
    end
    for (int a = 0; a < 64; a++) begin
      checks++;
      if (dmem[a] !== iss.dmem[a]) begin failures++; $display("FAIL mem[%0d]=%h exp %h", a, dmem[a], iss.dmem[a]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
