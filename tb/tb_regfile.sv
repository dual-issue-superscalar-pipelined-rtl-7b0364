// tb_regfile: random two-port writes and four-port reads against a model.
// Checks that $0 reads zero, that a value written at the falling edge is
// readable before the next rising edge, and that lane 2 wins when both
// ports write one register.
module tb_regfile;
  import mips_pkg::*;
  logic clk = 0;
  logic we1, we2;
  reg_idx_t ra1, ra2, ra3, ra4, wa1, wa2;
  word_t wd1, wd2, rd1, rd2, rd3, rd4;
  word_t model [32];
  bit    valid [32];
  int checks = 0, failures = 0;

  regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic word_t expv(reg_idx_t r);
    return (r == 0) ? '0 : model[r];
  endfunction

  task automatic chk(reg_idx_t r, word_t got, string port);
    if (r == 0 || valid[r]) begin
      checks++;
      if (got !== expv(r)) begin
        failures++;
        $display("FAIL %s r%0d got %h exp %h", port, r, got, expv(r));
      end
    end
  endtask

  initial begin
    foreach (valid[i]) valid[i] = 0;
    we1 = 0; we2 = 0;
    // write every register once so all reads are defined
    for (int r = 0; r < 32; r += 2) begin
      @(posedge clk); #1;
      we1 = 1; wa1 = 5'(r); wd1 = $urandom;
      we2 = 1; wa2 = 5'(r + 1); wd2 = $urandom;
      @(negedge clk); #1;
      model[r] = wd1; model[r + 1] = wd2; valid[r] = 1; valid[r + 1] = 1;
    end
    for (int i = 0; i < 600; i++) begin
      @(posedge clk); #1;
      we1 = 1'($urandom); we2 = 1'($urandom);
      wa1 = 5'($urandom); wa2 = ($urandom_range(3) == 0) ? wa1 : 5'($urandom);
      wd1 = $urandom; wd2 = $urandom;
      ra1 = 5'($urandom); ra2 = 5'($urandom); ra3 = wa1; ra4 = wa2;
      #1;
      // before the falling edge: old values
      chk(ra1, rd1, "rd1"); chk(ra2, rd2, "rd2"); chk(ra3, rd3, "rd3"); chk(ra4, rd4, "rd4");
      @(negedge clk); #1;
      if (we1) model[wa1] = wd1;
      if (we2) model[wa2] = wd2;
      // after the falling edge, same cycle: new values visible
      chk(ra1, rd1, "rd1"); chk(ra2, rd2, "rd2"); chk(ra3, rd3, "rd3"); chk(ra4, rd4, "rd4");
    end
    // both ports to one register: lane 2 wins
    @(posedge clk); #1;
    we1 = 1; we2 = 1; wa1 = 5'd7; wa2 = 5'd7; wd1 = 32'h1111_1111; wd2 = 32'h2222_2222; ra1 = 5'd7;
    @(negedge clk); #1;
    checks++; if (rd1 !== 32'h2222_2222) begin failures++; $display("FAIL dual write"); end
    we1 = 1; wa1 = 5'd0; wd1 = 32'hDEAD_BEEF; we2 = 0; ra2 = 5'd0;
    @(negedge clk); #1;
    checks++; if (rd2 !== 0) begin failures++; $display("FAIL $0 not zero"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
