// tb_fwd_mux5: checks that each select code passes the right input, on
// random data.
module tb_fwd_mux5;
  import mips_pkg::*;
  logic [31:0] d0, d1, d2, d3, d4, y;
  fwd_sel_e s;
  int checks = 0, failures = 0;

  fwd_mux5 #(.WIDTH(32)) dut (.d0, .d1, .d2, .d3, .d4, .s, .y);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] exp;
    for (int i = 0; i < 500; i++) begin
      d0 = $urandom; d1 = $urandom; d2 = $urandom; d3 = $urandom; d4 = $urandom;
      s = fwd_sel_e'(3'($urandom_range(4)));
      #1;
      case (s)
        FWD_NONE:    exp = d0;
        FWD_W_OWN:   exp = d1;
        FWD_M_OWN:   exp = d2;
        FWD_W_OTHER: exp = d3;
        default:     exp = d4;
      endcase
      checks++;
      if (y !== exp) begin failures++; $display("FAIL s=%b y=%h exp=%h", s, y, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
