// tb_mips_dual_top_full: runs the processor at its default configuration
// on its default program (rtl/program.hex).
//
// The program sets $t0=$t1=1, $s0=$t0+$t1=2, $t2=$t1-$t0=0, $t3=1, then
// loops on a lane-1 BEQ $s0,$t2 whose lane-2 partner adds $t3 to $t2, with
// a J back to the loop; when $t2 reaches $s0 the branch leaves the loop and
// $t0 and $t1 are set to 7. The pair behind the taken branch is squashed,
// but the lane-2 ADD beside it runs, so $t2 ends at 3. The test waits for
// the write-back of the last instruction, then compares $t0..$t3 and $s0
// with hand-computed values and with mips_iss_pkg, and checks the exact
// cycle of that final write-back against a cycle count worked out from the
// pipeline timing: 3 loop passes of 3 cycles (pair, J pair, squashed slot),
// plus 5 pipeline stages and the 5 straight-line pairs.
module tb_mips_dual_top_full;
  import mips_pkg::*;
  import mips_iss_pkg::*;

  logic clk = 0, reset = 1;
  word_t writedata1, writedata2, dataaddr1, dataaddr2, resultw1, resultw2;
  logic memwrite1, memwrite2, regwritew1, regwritew2;
  reg_idx_t writeregw1, writeregw2;

  int checks = 0, failures = 0;
  int cycle = 0, done_cycle = -1;
  int n_taken = 0, n_jump = 0, n_dual_wb = 0;

  mips_dual_top dut (
    .clk, .reset, .writedata1, .writedata2, .dataaddr1, .dataaddr2,
    .memwrite1, .memwrite2, .resultw1, .resultw2,
    .regwritew1, .regwritew2, .writeregw1, .writeregw2
  );

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  always @(negedge clk) begin
    #2;
    if (!reset && done_cycle < 0) begin
      cycle++;
      if (!dut.u_core.u_dp.stallf && dut.u_core.pcsrc_d[0]) n_taken++;
      if (!dut.u_core.u_dp.stallf && dut.u_core.ctrl_d[0].jump) n_jump++;
      if (regwritew1 && regwritew2 && writeregw1 != 0 && writeregw2 != 0) n_dual_wb++;
      // last instruction: addi $t1,$0,7 in lane 2
      if (regwritew2 && writeregw2 == 5'd9 && resultw2 == 32'd7) done_cycle = cycle;
    end
  end

  initial begin
    mips_iss iss;
    logic [31:0] prog [64];
    foreach (prog[i]) prog[i] = '0;
    $readmemh("rtl/program.hex", prog);
    iss = new();
    foreach (prog[i]) iss.imem[i] = prog[i];
    iss.run(1000, 12);

    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 0;
    wait (done_cycle >= 0);
    @(negedge clk);

    check(dut.u_core.u_dp.u_rf.rf[8]  == 32'd7, "$t0 = 7");
    check(dut.u_core.u_dp.u_rf.rf[9]  == 32'd7, "$t1 = 7");
    check(dut.u_core.u_dp.u_rf.rf[10] == 32'd3, "$t2 = 3");
    check(dut.u_core.u_dp.u_rf.rf[11] == 32'd1, "$t3 = 1");
    check(dut.u_core.u_dp.u_rf.rf[16] == 32'd2, "$s0 = 2");
    for (int r = 1; r < 32; r++)
      if (iss.written_r[r])
        check(dut.u_core.u_dp.u_rf.rf[r] == iss.regs[r],
              $sformatf("reg $%0d = %h, model %h", r, dut.u_core.u_dp.u_rf.rf[r], iss.regs[r]));
    check(n_taken == 1, $sformatf("one taken branch, saw %0d", n_taken));
    check(n_jump == 2, $sformatf("two jumps, saw %0d", n_jump));
    check(n_dual_wb > 0, "both lanes write back in one cycle");
    // pairs 0..3 issue in cycles 1..4, then loop passes start at cycles 4, 7, 10;
    // the exit pair is fetched 2 cycles after the last BEQ's fetch and writes
    // back 4 cycles later.
    check(done_cycle == 10 + 2 + 4, $sformatf("last write-back in cycle %0d, expected 16", done_cycle));
    $display("final write-back cycle %0d, taken=%0d jumps=%0d", done_cycle, n_taken, n_jump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
