// tb_pipe_reg_mw: loads random mw_t values every cycle and checks that the
// output is the previous cycle's input, or zero after reset.
module tb_pipe_reg_mw;
  import mips_pkg::*;
  logic clk = 0, reset = 1;
  mw_t m, w, exp;
  logic [127:0] rnd;
  int checks = 0, failures = 0;

  pipe_reg_mw dut (.clk, .reset, .m, .w);

  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    m = '0;
    @(posedge clk); #1;
    checks++; if (w !== '0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 300; i++) begin
      reset = ($urandom_range(15) == 0);
      rnd = {$urandom, $urandom, $urandom, $urandom};
      m = rnd[$bits(mw_t)-1:0];
      @(posedge clk); #1;
      exp = (reset) ? '0 : m;
      checks++;
      if (w !== exp) begin failures++; $display("FAIL cycle %0d got %h exp %h", i, w, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
