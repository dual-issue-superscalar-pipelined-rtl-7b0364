// tb_mips_dual_random: randomised programs on the dual-issue core.
//
// Generates NPROG programs of 24 instruction pairs over registers $1..$8
// and 16 data words, so that forwarding, stalls and memory aliasing occur
// often. Each program starts by setting $1..$8, ends in a halt loop, and
// obeys the scheduling rules of the core: no dependency inside a pair,
// through a register or through a data word; a
// load's result is not read by the other lane in the next pair; BEQ and J
// only in lane 1, skipping exactly one pair forward; a BEQ operand is not
// written by lane 2 in the three pairs before it. Each program runs on the
// core (memories modelled here) from reset and the final registers and
// data memory are compared with mips_iss_pkg.
module tb_mips_dual_random;
  import mips_pkg::*;
  import mips_iss_pkg::*;

  localparam int NPROG = 40;
  localparam int NPAIRS = 24;

  logic clk = 0, reset = 1;
  word_t pcf, aluoutm1, aluoutm2, writedatam1, writedatam2, readdatam1, readdatam2, resultw1, resultw2;
  logic [63:0] instrf;
  logic memwritem1, memwritem2, regwritew1, regwritew2;
  reg_idx_t writeregw1, writeregw2;
  logic [31:0] imem [64];
  word_t dmem [64];
  int checks = 0, failures = 0;
  int n_stall = 0, n_taken = 0;

  mips_dual_core dut (.*);

  always #5 clk = ~clk;

  assign instrf     = {imem[pcf[7:2]], imem[6'(pcf[7:2] + 1)]};
  assign readdatam1 = dmem[aluoutm1[7:2]];
  assign readdatam2 = dmem[aluoutm2[7:2]];

  always @(posedge clk) begin
    if (memwritem1) dmem[aluoutm1[7:2]] <= writedatam1;
    if (memwritem2) dmem[aluoutm2[7:2]] <= writedatam2;
  end

  always @(negedge clk) begin
    #2;
    if (!reset) begin
      if (dut.u_dp.stallf) n_stall++;
      if (!dut.u_dp.stallf && dut.pcsrc_d[0]) n_taken++;
    end
  end

  initial begin
    repeat (NPROG * 200 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] r_type(int rd, int rs, int rt, logic [5:0] fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'h0, fn};
  endfunction
  function automatic logic [31:0] i_type(logic [5:0] op, int rs, int rt, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction

  // One random non-control instruction. dst = destination (0 if none),
  // src mask = registers read. Sources avoid `forbid` (bit mask).
  function automatic logic [31:0] rand_op(logic [8:0] forbid, output int dst, output logic [8:0] srcs,
                                          output bit is_load);
    int rs, rt, rd, k;
    logic [5:0] fns [5] = '{6'h20, 6'h22, 6'h24, 6'h25, 6'h2a};
    do rs = $urandom_range(8); while (rs != 0 && forbid[rs]);
    do rt = $urandom_range(8); while (rt != 0 && forbid[rt]);
    rd = $urandom_range(1, 8);
    is_load = 0;
    k = $urandom_range(9);
    srcs = '0;
    if (k < 5) begin
      dst = rd; srcs[rs] = 1; srcs[rt] = 1;
      return r_type(rd, rs, rt, fns[k]);
    end else if (k < 7) begin
      dst = rt; srcs[rs] = 1;
      return i_type(6'h08, rs, rt, $urandom_range(0, 40) - 20);
    end else if (k < 8) begin
      dst = rt; is_load = 1;
      return i_type(6'h23, 0, rt, 4 * $urandom_range(15));
    end else begin
      dst = 0; srcs[rt] = 1;
      return i_type(6'h2b, 0, rt, 4 * $urandom_range(15));
    end
  endfunction

  task automatic gen_program();
    logic [8:0] ld_dst [2];       // load destinations of the previous pair, per lane
    logic [8:0] l2_dst [3];       // lane-2 destinations of the last three pairs
    foreach (imem[i]) imem[i] = '0;
    for (int r = 1; r <= 8; r += 2) begin
      imem[r - 1] = i_type(6'h08, 0, r, $urandom_range(0, 30) - 10);
      imem[r]     = i_type(6'h08, 0, r + 1, $urandom_range(0, 30) - 10);
    end
    ld_dst = '{default: '0};
    l2_dst = '{default: '0};
    l2_dst[0][8] = 1; l2_dst[1][6] = 1; l2_dst[2][4] = 1;   // lane 2 of set-up pairs 3, 2, 1
    for (int p = 4; p < NPAIRS; p++) begin
      int d1, d2;
      logic [8:0] s1, s2, forbid1, forbid2, no_br;
      bit ld1, ld2;
      forbid1 = ld_dst[1];                 // lane 1 must not read lane-2 load of previous pair
      no_br   = l2_dst[0] | l2_dst[1] | l2_dst[2];
      if (p < NPAIRS - 2 && $urandom_range(4) == 0) begin
        // control instruction in lane 1, skipping the next pair
        int rs, rt;
        if ($urandom_range(3) == 0) begin
          imem[2 * p] = {6'h02, 26'(2 * p + 4)};
          s1 = '0;
        end else begin
          do rs = $urandom_range(8); while (rs != 0 && (no_br[rs] || forbid1[rs]));
          do rt = $urandom_range(8); while (rt != 0 && (no_br[rt] || forbid1[rt]));
          if ($urandom_range(1)) rt = rs;   // often taken
          imem[2 * p] = i_type(6'h04, rs, rt, 3);
        end
        d1 = 0; ld1 = 0;
      end else begin
        imem[2 * p] = rand_op(forbid1, d1, s1, ld1);
      end
      forbid2 = ld_dst[0];
      if (d1 != 0) forbid2[d1] = 1;          // no dependency inside the pair
      // lane 2 must not load the word lane 1 stores in the same pair
      do imem[2 * p + 1] = rand_op(forbid2, d2, s2, ld2);
      while (ld2 && imem[2 * p][31:26] == 6'h2b && imem[2 * p][15:0] == imem[2 * p + 1][15:0]);
      ld_dst[0] = '0; ld_dst[1] = '0;
      if (ld1) ld_dst[0][d1] = 1;
      if (ld2) ld_dst[1][d2] = 1;
      l2_dst[2] = l2_dst[1]; l2_dst[1] = l2_dst[0]; l2_dst[0] = '0;
      if (d2 != 0) l2_dst[0][d2] = 1;
    end
    imem[2 * NPAIRS]     = {6'h02, 26'(2 * NPAIRS)};   // halt: j self
    imem[2 * NPAIRS + 1] = '0;
  endtask

  initial begin
    for (int n = 0; n < NPROG; n++) begin
      mips_iss iss;
      gen_program();
      foreach (dmem[i]) dmem[i] = '0;
      iss = new();
      foreach (imem[i]) iss.imem[i] = imem[i];
      iss.run(1000);
      reset = 1;
      repeat (2) @(posedge clk);
      @(negedge clk);
      reset = 0;
      repeat (NPAIRS * 4 + 20) @(posedge clk);
      @(negedge clk);
      for (int r = 1; r < 32; r++)
        if (iss.written_r[r]) begin
          checks++;
          if (dut.u_dp.u_rf.rf[r] !== iss.regs[r]) begin
            failures++;
            $display("FAIL prog %0d: $%0d = %h, expected %h", n, r, dut.u_dp.u_rf.rf[r], iss.regs[r]);
          end
        end
      for (int a = 0; a < 64; a++) begin
        checks++;
        if (dmem[a] !== iss.dmem[a]) begin
          failures++;
          $display("FAIL prog %0d: mem[%0d] = %h, expected %h", n, a, dmem[a], iss.dmem[a]);
        end
      end
    end
    checks++;
    if (n_stall == 0 || n_taken == 0) begin failures++; $display("FAIL no stall or taken branch"); end
    $display("programs=%0d stall_cycles=%0d taken_branches=%0d", NPROG, n_stall, n_taken);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
