// tb_mips_dual_top: end-to-end test of the dual-issue processor.
//
// Runs tb/prog_hazards.hex, a program scheduled so that every pipeline
// mechanism occurs: E-stage forwarding from own/other lane M and W stages,
// decode-stage branch forwarding on both operands, load-use stalls, branch
// stalls (after an ALU producer and after a load), taken and not-taken
// branches with the pair behind a taken branch squashed, a jump, dual loads,
// dual stores and two stores to one word in the same cycle. The final
// register file and data memory are compared with the instruction-level
// model in mips_iss_pkg; each mechanism is counted and a mechanism that
// never occurs is a failure. Squashed instructions write $17/$18 only, so
// any write-back to those is a failure. The first pair must write back in
// the fifth cycle after reset, in both lanes at once.
module tb_mips_dual_top;
  import mips_pkg::*;
  import mips_iss_pkg::*;

  logic clk = 0, reset = 1;
  word_t writedata1, writedata2, dataaddr1, dataaddr2, resultw1, resultw2;
  logic memwrite1, memwrite2, regwritew1, regwritew2;
  reg_idx_t writeregw1, writeregw2;

  int checks = 0, failures = 0;

  mips_dual_top #(.IMEM_FILE("tb/prog_hazards.hex")) dut (
    .clk, .reset, .writedata1, .writedata2, .dataaddr1, .dataaddr2,
    .memwrite1, .memwrite2, .resultw1, .resultw2,
    .regwritew1, .regwritew2, .writeregw1, .writeregw2
  );

  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters
  int n_fwd [8];
  int n_fwdd_a, n_fwdd_b, n_lwstall, n_brstall, n_taken, n_not_taken, n_jump;
  int n_dual_store, n_dual_load, n_dual_wb, n_squash_wb, n_same_word_store;
  int first_wb_cycle = -1, cycle = 0;
  bit first_wb_dual;

  initial begin
    foreach (n_fwd[i]) n_fwd[i] = 0;
    {n_fwdd_a, n_fwdd_b, n_lwstall, n_brstall, n_taken, n_not_taken, n_jump} = '0;
    {n_dual_store, n_dual_load, n_dual_wb, n_squash_wb, n_same_word_store} = '0;
  end

  // sample late in each cycle, when all combinational values have settled
  always @(negedge clk) begin
    #2;
    if (!reset) begin
      cycle++;
      for (int l = 0; l < 2; l++) begin
        n_fwd[dut.u_core.u_dp.forwardae[l]]++;
        n_fwd[dut.u_core.u_dp.forwardbe[l]]++;
        if (dut.u_core.u_dp.forwardad[l]) n_fwdd_a++;
        if (dut.u_core.u_dp.forwardbd[l]) n_fwdd_b++;
        if (dut.u_core.u_dp.u_hz.lwstall[l]) n_lwstall++;
        if (dut.u_core.u_dp.u_hz.branchstall[l]) n_brstall++;
      end
      if (!dut.u_core.u_dp.stallf && dut.u_core.ctrl_d[0].branch) begin
        if (dut.u_core.pcsrc_d[0]) n_taken++;
        else n_not_taken++;
      end
      if (!dut.u_core.u_dp.stallf && dut.u_core.ctrl_d[0].jump && dut.u_core.instrd[0][5:0] != 6'd40)
        n_jump++;
      if (memwrite1 && memwrite2) begin
        n_dual_store++;
        if (dataaddr1[7:2] == dataaddr2[7:2]) n_same_word_store++;
      end
      if (dut.u_core.u_dp.em_m[0].memtoreg && dut.u_core.u_dp.em_m[1].memtoreg) n_dual_load++;
      if (regwritew1 && regwritew2 && writeregw1 != 0 && writeregw2 != 0) n_dual_wb++;
      if ((regwritew1 && (writeregw1 == 17 || writeregw1 == 18)) ||
          (regwritew2 && (writeregw2 == 17 || writeregw2 == 18))) n_squash_wb++;
      if (first_wb_cycle < 0 && (regwritew1 || regwritew2) && (writeregw1 != 0 || writeregw2 != 0)) begin
        first_wb_cycle = cycle;
        first_wb_dual  = regwritew1 && regwritew2;
      end
    end
  end

  initial begin
    mips_iss iss;
    logic [31:0] prog [64];
    foreach (prog[i]) prog[i] = '0;
    $readmemh("tb/prog_hazards.hex", prog);
    iss = new();
    foreach (prog[i]) iss.imem[i] = prog[i];
    iss.run(1000);

    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 0;
    repeat (120) @(posedge clk);
    @(negedge clk);

    for (int r = 1; r < 32; r++)
      if (iss.written_r[r])
        check(dut.u_core.u_dp.u_rf.rf[r] == iss.regs[r],
              $sformatf("reg $%0d = %h, expected %h", r, dut.u_core.u_dp.u_rf.rf[r], iss.regs[r]));
    for (int a = 0; a < 64; a++)
      if (iss.written_m[a])
        check(dut.u_dmem.ram[a] == iss.dmem[a],
              $sformatf("mem[%0d] = %h, expected %h", a, dut.u_dmem.ram[a], iss.dmem[a]));
    // a few hand-computed values, independent of the model
    check(dut.u_core.u_dp.u_rf.rf[3]  == 32'd12, "$3 = 5+7");
    check(dut.u_core.u_dp.u_rf.rf[4]  == 32'd2,  "$4 = 7-5");
    check(dut.u_core.u_dp.u_rf.rf[9]  == 32'd17, "$9 = load(12)+5");
    check(dut.u_core.u_dp.u_rf.rf[10] == 32'd9,  "$10 = load(2)+7");
    check(dut.u_core.u_dp.u_rf.rf[16] == 32'd100, "delay-slot addi executed");
    check(dut.u_dmem.ram[2] == 32'd9, "lane 2 wins same-word store");
    check(dut.u_core.u_dp.u_rf.rf[24] == 32'd9, "$24 reloads the stored 9");

    check(first_wb_cycle == 5, $sformatf("first write-back in cycle %0d, expected 5", first_wb_cycle));
    check(first_wb_dual, "first pair writes back in both lanes at once");
    check(n_squash_wb == 0, "squashed instructions never write back");

    check(n_fwd[FWD_W_OWN]   > 0, "forward from own-lane W");
    check(n_fwd[FWD_M_OWN]   > 0, "forward from own-lane M");
    check(n_fwd[FWD_W_OTHER] > 0, "forward from other-lane W");
    check(n_fwd[FWD_M_OTHER] > 0, "forward from other-lane M");
    check(n_fwdd_a > 0, "decode forward, operand A");
    check(n_fwdd_b > 0, "decode forward, operand B");
    check(n_lwstall > 0, "load-use stall");
    check(n_brstall > 0, "branch stall");
    check(n_taken > 0, "taken branch");
    check(n_not_taken > 0, "not-taken branch");
    check(n_jump > 0, "jump");
    check(n_dual_store > 0, "two stores in one cycle");
    check(n_same_word_store > 0, "two stores to one word");
    check(n_dual_load > 0, "two loads in one cycle");
    check(n_dual_wb > 0, "two write-backs in one cycle");

    $display("mechanisms: fwdW_own=%0d fwdM_own=%0d fwdW_oth=%0d fwdM_oth=%0d fwdDA=%0d fwdDB=%0d lwstall=%0d brstall=%0d taken=%0d not_taken=%0d jump=%0d dual_st=%0d same_word=%0d dual_ld=%0d dual_wb=%0d",
             n_fwd[1], n_fwd[2], n_fwd[3], n_fwd[4], n_fwdd_a, n_fwdd_b, n_lwstall, n_brstall,
             n_taken, n_not_taken, n_jump, n_dual_store, n_same_word_store, n_dual_load, n_dual_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
