// tb_branch_compare: checks the branch comparator with and without the
// M-stage forward on each operand, on equal and unequal values.
module tb_branch_compare;
  import mips_pkg::*;
  word_t rd_a, rd_b, aluoutm;
  logic fwd_a, fwd_b, equal;
  int checks = 0, failures = 0;

  branch_compare dut (.rd_a, .rd_b, .aluoutm, .fwd_a, .fwd_b, .equal);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic exp;
    word_t x, z;
    for (int i = 0; i < 1000; i++) begin
      rd_a = $urandom; aluoutm = $urandom;
      case ($urandom_range(3))
        0: rd_b = rd_a;
        1: rd_b = aluoutm;
        default: rd_b = $urandom;
      endcase
      if ($urandom_range(3) == 0) rd_a = aluoutm;
      fwd_a = 1'($urandom); fwd_b = 1'($urandom);
      #1;
      x = fwd_a ? aluoutm : rd_a;
      z = fwd_b ? aluoutm : rd_b;
      exp = (x == z);
      checks++;
      if (equal !== exp) begin
        failures++;
        $display("FAIL a=%h b=%h m=%h fa=%b fb=%b eq=%b", rd_a, rd_b, aluoutm, fwd_a, fwd_b, equal);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
