// tb_pipe_reg_em: loads random em_t values every cycle and checks that the
// output is the previous cycle's input, or zero after reset.
module tb_pipe_reg_em;
  import mips_pkg::*;
  logic clk = 0, reset = 1;
  em_t e, m, exp;
  logic [127:0] rnd;
  int checks = 0, failures = 0;

  pipe_reg_em dut (.clk, .reset, .e, .m);

  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    e = '0;
    @(posedge clk); #1;
    checks++; if (m !== '0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 300; i++) begin
      reset = ($urandom_range(15) == 0);
      rnd = {$urandom, $urandom, $urandom, $urandom};
      e = rnd[$bits(em_t)-1:0];
      @(posedge clk); #1;
      exp = (reset) ? '0 : e;
      checks++;
      if (m !== exp) begin failures++; $display("FAIL cycle %0d got %h exp %h", i, m, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
