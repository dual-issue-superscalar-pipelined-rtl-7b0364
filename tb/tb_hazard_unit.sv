// tb_hazard_unit: random register numbers and enables (drawn from a small
// register range so that matches are frequent) are checked against a model
// written here: E-stage forwarding takes the youngest matching producer in
// the order lane-2 M, lane-1 M, lane-2 W, lane-1 W and reports it with the
// own/other-lane code; decode forwarding matches the own-lane M stage; a
// load-use or branch hazard in either lane stalls F and both D stages and
// flushes both E stages. A few directed cases are checked as well.
module tb_hazard_unit;
  import mips_pkg::*;
  logic     branchd [2], regwritee [2], memtorege [2], regwritem [2], memtoregm [2], regwritew [2];
  reg_idx_t rsd [2], rtd [2], rse [2], rte [2], writerege [2], writeregm [2], writeregw [2];
  logic     stallf, stalld [2], flushe [2], forwardad [2], forwardbd [2];
  fwd_sel_e forwardae [2], forwardbe [2];
  int checks = 0, failures = 0;
  int n_stall = 0, n_code [8];

  hazard_unit dut (.*);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic fwd_sel_e ref_fwd(int lane, reg_idx_t src);
    // age order: M lane2, M lane1, W lane2, W lane1
    if (src == 0) return FWD_NONE;
    if (regwritem[1] && writeregm[1] == src) return (lane == 1) ? FWD_M_OWN : FWD_M_OTHER;
    if (regwritem[0] && writeregm[0] == src) return (lane == 0) ? FWD_M_OWN : FWD_M_OTHER;
    if (regwritew[1] && writeregw[1] == src) return (lane == 1) ? FWD_W_OWN : FWD_W_OTHER;
    if (regwritew[0] && writeregw[0] == src) return (lane == 0) ? FWD_W_OWN : FWD_W_OTHER;
    return FWD_NONE;
  endfunction

  function automatic logic ref_stall();
    logic s = 0;
    for (int l = 0; l < 2; l++) begin
      if (memtorege[l] && (rsd[l] == rte[l] || rtd[l] == rte[l])) s = 1;
      if (branchd[l] && regwritee[l] && (writerege[l] == rsd[l] || writerege[l] == rtd[l])) s = 1;
      if (branchd[l] && memtoregm[l] && (writeregm[l] == rsd[l] || writeregm[l] == rtd[l])) s = 1;
    end
    return s;
  endfunction

  task automatic compare();
    logic st;
    #1;
    st = ref_stall();
    checks++;
    if (stallf !== st || stalld[0] !== st || stalld[1] !== st || flushe[0] !== st || flushe[1] !== st) begin
      failures++;
      $display("FAIL stall got %b exp %b", stallf, st);
    end
    if (st) n_stall++;
    for (int l = 0; l < 2; l++) begin
      checks++;
      if (forwardae[l] !== ref_fwd(l, rse[l]) || forwardbe[l] !== ref_fwd(l, rte[l])) begin
        failures++;
        $display("FAIL lane %0d forwardae=%b exp %b forwardbe=%b exp %b", l,
                 forwardae[l], ref_fwd(l, rse[l]), forwardbe[l], ref_fwd(l, rte[l]));
      end
      n_code[forwardae[l]]++;
      checks++;
      if (forwardad[l] !== (rsd[l] != 0 && rsd[l] == writeregm[l] && regwritem[l]) ||
          forwardbd[l] !== (rtd[l] != 0 && rtd[l] == writeregm[l] && regwritem[l])) begin
        failures++;
        $display("FAIL lane %0d decode forward", l);
      end
    end
  endtask

  task automatic clear_all();
    for (int l = 0; l < 2; l++) begin
      branchd[l] = 0; regwritee[l] = 0; memtorege[l] = 0; regwritem[l] = 0; memtoregm[l] = 0;
      regwritew[l] = 0; rsd[l] = 0; rtd[l] = 0; rse[l] = 0; rte[l] = 0;
      writerege[l] = 0; writeregm[l] = 0; writeregw[l] = 0;
    end
  endtask

  initial begin
    foreach (n_code[i]) n_code[i] = 0;
    // directed: lane 1 reads $5 written by an older lane-1 (W) and a newer lane-2 (M)
    clear_all();
    rse[0] = 5; regwritew[0] = 1; writeregw[0] = 5; regwritem[1] = 1; writeregm[1] = 5;
    #1; checks++;
    if (forwardae[0] !== FWD_M_OTHER) begin failures++; $display("FAIL newest producer"); end
    // directed: same pair writes $6 in both lanes; lane 2's value is the newer one
    clear_all();
    rte[1] = 6; regwritem[0] = 1; writeregm[0] = 6; regwritem[1] = 1; writeregm[1] = 6;
    #1; checks++;
    if (forwardbe[1] !== FWD_M_OWN) begin failures++; $display("FAIL same-pair WAW"); end
    // directed: lane-2 load-use stalls both lanes
    clear_all();
    rsd[1] = 9; rte[1] = 9; memtorege[1] = 1;
    #1; checks++;
    if (!(stallf && stalld[0] && stalld[1] && flushe[0] && flushe[1])) begin failures++; $display("FAIL lane-2 lwstall"); end
    // directed: load in M does not stall a non-branch
    clear_all();
    rsd[0] = 9; writeregm[0] = 9; memtoregm[0] = 1;
    #1; checks++;
    if (stallf) begin failures++; $display("FAIL load in M stalled a non-branch"); end
    for (int i = 0; i < 5000; i++) begin
      for (int l = 0; l < 2; l++) begin
        branchd[l] = ($urandom_range(3) == 0); regwritee[l] = 1'($urandom); memtorege[l] = ($urandom_range(3) == 0);
        regwritem[l] = 1'($urandom); memtoregm[l] = ($urandom_range(3) == 0); regwritew[l] = 1'($urandom);
        rsd[l] = 5'($urandom_range(4)); rtd[l] = 5'($urandom_range(4));
        rse[l] = 5'($urandom_range(4)); rte[l] = 5'($urandom_range(4));
        writerege[l] = 5'($urandom_range(4)); writeregm[l] = 5'($urandom_range(4)); writeregw[l] = 5'($urandom_range(4));
      end
      compare();
    end
    checks++;
    if (n_stall == 0 || n_code[1] == 0 || n_code[2] == 0 || n_code[3] == 0 || n_code[4] == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
