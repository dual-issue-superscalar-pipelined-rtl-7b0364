// hazard_unit: forwarding and stall control for the two issue lanes.
//
// Index 0 of every array is lane 1 (the older instruction of a pair),
// index 1 is lane 2.
//
// Execute-stage forwarding (forwardae/forwardbe, codes of mips_pkg::fwd_sel_e):
// a source register that is not $0 and matches a destination being written
// later in the pipe takes that value instead of the register-file copy.
// Four producers can match: each lane's M-stage ALU result and each lane's
// write-back result. The design description gives the five-way select and
// its codes; the priority here is by program age (M before W, and within a
// stage lane 2 before lane 1) so that the newest value always wins.
//
// Decode-stage forwarding (forwardad/forwardbd): a branch operand that the
// same lane's M-stage instruction is producing is taken from its ALU result.
//
// Stalls, detected per lane as in the design description:
//   load-use:  a decode-stage source equals Rt of a load in the same lane's
//              E stage;
//   branch:    a BEQ in decode needs a register that the same lane's E stage
//              will write, or that a load in the same lane's M stage will
//              write.
// Both lanes share one fetch PC, so any stall holds the PC and both F/D
// registers and turns both E stages into bubbles (the description stalls the
// lanes separately; holding the pair together is this design's choice).
// Hazards between lanes of different pairs other than those resolved by
// forwarding are not detected; software keeps such instructions apart.
// Combinational.
module hazard_unit
  import mips_pkg::*;
(
  input  logic     branchd   [2],
  input  reg_idx_t rsd       [2],
  input  reg_idx_t rtd       [2],
  input  reg_idx_t rse       [2],
  input  reg_idx_t rte       [2],
  input  reg_idx_t writerege [2],
  input  logic     regwritee [2],
  input  logic     memtorege [2],
  input  reg_idx_t writeregm [2],
  input  logic     regwritem [2],
  input  logic     memtoregm [2],
  input  reg_idx_t writeregw [2],
  input  logic     regwritew [2],
  output logic     stallf,
  output logic     stalld    [2],
  output logic     flushe    [2],
  output logic     forwardad [2],
  output logic     forwardbd [2],
  output fwd_sel_e forwardae [2],
  output fwd_sel_e forwardbe [2]
);

  logic lwstall     [2];
  logic branchstall [2];
  logic stall;

  // Select for one E-stage source of lane `own`.
  function automatic fwd_sel_e fwd_select(input int own, input reg_idx_t src,
                                          input reg_idx_t wm [2], input logic rwm [2],
                                          input reg_idx_t ww [2], input logic rww [2]);
    int oth;
    logic hit_m_own, hit_m_oth, hit_w_own, hit_w_oth;
    oth = 1 - own;
    hit_m_own = (src != '0) && (src == wm[own]) && rwm[own];
    hit_m_oth = (src != '0) && (src == wm[oth]) && rwm[oth];
    hit_w_own = (src != '0) && (src == ww[own]) && rww[own];
    hit_w_oth = (src != '0) && (src == ww[oth]) && rww[oth];
    if (own == 1) begin
      // lane 2 is the younger one in each stage
      if (hit_m_own)      return FWD_M_OWN;
      else if (hit_m_oth) return FWD_M_OTHER;
      else if (hit_w_own) return FWD_W_OWN;
      else if (hit_w_oth) return FWD_W_OTHER;
      else                return FWD_NONE;
    end else begin
      if (hit_m_oth)      return FWD_M_OTHER;
      else if (hit_m_own) return FWD_M_OWN;
      else if (hit_w_oth) return FWD_W_OTHER;
      else if (hit_w_own) return FWD_W_OWN;
      else                return FWD_NONE;
    end
  endfunction

  always_comb begin
    for (int l = 0; l < 2; l++) begin
      forwardad[l] = (rsd[l] != '0) && (rsd[l] == writeregm[l]) && regwritem[l];
      forwardbd[l] = (rtd[l] != '0) && (rtd[l] == writeregm[l]) && regwritem[l];
      forwardae[l] = fwd_select(l, rse[l], writeregm, regwritem, writeregw, regwritew);
      forwardbe[l] = fwd_select(l, rte[l], writeregm, regwritem, writeregw, regwritew);

      lwstall[l] = memtorege[l] && ((rsd[l] == rte[l]) || (rtd[l] == rte[l]));
      branchstall[l] = branchd[l] &&
          ((regwritee[l] && ((writerege[l] == rsd[l]) || (writerege[l] == rtd[l]))) ||
           (memtoregm[l] && ((writeregm[l] == rsd[l]) || (writeregm[l] == rtd[l]))));
    end
    stall  = lwstall[0] || lwstall[1] || branchstall[0] || branchstall[1];
    stallf = stall;
    for (int l = 0; l < 2; l++) begin
      stalld[l] = stall;
      flushe[l] = stall;
    end
  end

endmodule
