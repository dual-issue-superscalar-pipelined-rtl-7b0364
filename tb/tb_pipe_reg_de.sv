// tb_pipe_reg_de: loads random de_t values every cycle and checks that the
// output is the previous cycle's input, or zero after reset or clear (FlushE).
module tb_pipe_reg_de;
  import mips_pkg::*;
  logic clk = 0, reset = 1, clr = 0;
  de_t d, e, exp;
  logic [127:0] rnd;
  int checks = 0, failures = 0;

  pipe_reg_de dut (.clk, .reset, .clr, .d, .e);

  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    d = '0;
    @(posedge clk); #1;
    checks++; if (e !== '0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 300; i++) begin
      reset = ($urandom_range(15) == 0);
      clr = ($urandom_range(5) == 0);
      rnd = {$urandom, $urandom, $urandom, $urandom};
      d = rnd[$bits(de_t)-1:0];
      @(posedge clk); #1;
      exp = (reset || clr) ? '0 : d;
      checks++;
      if (e !== exp) begin failures++; $display("FAIL cycle %0d got %h exp %h", i, e, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
