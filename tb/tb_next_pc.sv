// tb_next_pc: checks reset, PC+8 stepping, stall hold, branch target
// PC+4+(imm<<2) (forward and backward) and jump target, one cycle each.
module tb_next_pc;
  import mips_pkg::*;
  logic clk = 0, reset = 1, en, pcsrc, jump;
  word_t pcplus4d, signimmd, pcf, pcplus4f, pcplus8f;
  logic [25:0] jaddr;
  int checks = 0, failures = 0;

  next_pc dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_pc(word_t exp, string what);
    checks++;
    if (pcf !== exp || pcplus4f !== exp + 4 || pcplus8f !== exp + 8) begin
      failures++;
      $display("FAIL %s: pc=%h exp %h", what, pcf, exp);
    end
  endtask

  initial begin
    en = 1; pcsrc = 0; jump = 0; pcplus4d = 0; signimmd = 0; jaddr = 0;
    #12;
    expect_pc(0, "reset");
    @(negedge clk); reset = 0;
    @(posedge clk); #1; expect_pc(8, "step 1");
    @(posedge clk); #1; expect_pc(16, "step 2");
    en = 0;
    @(posedge clk); #1; expect_pc(16, "stall");
    en = 1; pcsrc = 1; pcplus4d = 32'h0000_0104; signimmd = 32'd3;
    @(posedge clk); #1; expect_pc(32'h0000_0110, "branch forward");
    signimmd = 32'hFFFF_FFFC;  // -4
    @(posedge clk); #1; expect_pc(32'h0000_00F4, "branch backward");
    pcsrc = 1; jump = 1; jaddr = 26'h010_0006;
    @(posedge clk); #1; expect_pc(32'h0040_0018, "jump wins over branch");
    pcsrc = 0; jump = 0;
    @(posedge clk); #1; expect_pc(32'h0040_0020, "step after jump");
    reset = 1; #1; expect_pc(0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
