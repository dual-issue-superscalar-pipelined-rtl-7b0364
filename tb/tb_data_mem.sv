// tb_data_mem: random stores and loads on both ports against a model;
// loads are combinational, stores land at the rising edge, and lane 2 wins
// when both ports store to one word.
module tb_data_mem;
  import mips_pkg::*;
  logic clk = 0, we1, we2;
  word_t a1, a2, wd1, wd2, rd1, rd2;
  word_t model [64];
  int checks = 0, failures = 0;

  data_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we1 = 0; we2 = 0;
    for (int i = 0; i < 64; i += 2) begin
      @(negedge clk);
      we1 = 1; we2 = 1; a1 = i * 4; a2 = (i + 1) * 4; wd1 = $urandom; wd2 = $urandom;
      model[i] = wd1; model[i + 1] = wd2;
    end
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      we1 = 1'($urandom); we2 = 1'($urandom);
      a1 = {24'h0, 6'($urandom), 2'b00};
      a2 = ($urandom_range(3) == 0) ? a1 : {24'h0, 6'($urandom), 2'b00};
      wd1 = $urandom; wd2 = $urandom;
      #1;
      checks++;
      if (rd1 !== model[a1[7:2]] || rd2 !== model[a2[7:2]]) begin
        failures++;
        $display("FAIL read a1=%h a2=%h", a1, a2);
      end
      if (we1) model[a1[7:2]] = wd1;
      if (we2) model[a2[7:2]] = wd2;
    end
    @(negedge clk);
    we1 = 0; we2 = 0;
    for (int i = 0; i < 64; i++) begin
      a1 = i * 4; a2 = (63 - i) * 4; #1;
      checks++;
      if (rd1 !== model[i] || rd2 !== model[63 - i]) begin failures++; $display("FAIL final %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
