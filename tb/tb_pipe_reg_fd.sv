// tb_pipe_reg_fd: checks load, hold on stall (en low), clear to NOP on a
// redirect, clear ignored while stalled, and reset.
module tb_pipe_reg_fd;
  import mips_pkg::*;
  logic clk = 0, reset = 1, en, clr;
  word_t instrf, pcf_in, instrd, pcd;
  word_t ei, ep;
  int checks = 0, failures = 0;

  pipe_reg_fd dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 1; clr = 0; instrf = 32'h1234_5678; pcf_in = 32'h40;
    @(posedge clk); #1;
    checks++; if (instrd !== 0 || pcd !== 0) begin failures++; $display("FAIL reset"); end
    reset = 0;
    ei = 0; ep = 0;
    for (int i = 0; i < 400; i++) begin
      en = 1'($urandom); clr = ($urandom_range(3) == 0);
      if ($urandom_range(19) == 0) reset = 1; else reset = 0;
      instrf = $urandom; pcf_in = $urandom;
      @(posedge clk); #1;
      if (reset) begin ei = 0; ep = 0; end
      else if (en) begin
        if (clr) begin ei = 0; ep = 0; end
        else begin ei = instrf; ep = pcf_in; end
      end
      checks++;
      if (instrd !== ei || pcd !== ep) begin
        failures++;
        $display("FAIL en=%b clr=%b rst=%b got %h/%h exp %h/%h", en, clr, reset, instrd, pcd, ei, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
