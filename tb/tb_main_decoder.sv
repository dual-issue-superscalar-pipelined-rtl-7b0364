// tb_main_decoder: checks the 9-bit control word of every opcode against
// the control table (R-type, LW, SW, BEQ, ADDI, J; others all zero).
module tb_main_decoder;
  import mips_pkg::*;
  logic [5:0] op;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  main_decoder dut (.op, .ctrl);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [8:0] exp;
    for (int i = 0; i < 64; i++) begin
      op = 6'(i); #1;
      case (6'(i))
        6'b000000: exp = 9'b110000010;
        6'b100011: exp = 9'b101001000;
        6'b101011: exp = 9'b001010000;
        6'b000100: exp = 9'b000100001;
        6'b001000: exp = 9'b101000000;
        6'b000010: exp = 9'b000000100;
        default:   exp = 9'b000000000;
      endcase
      checks++;
      if (ctrl !== exp) begin
        failures++;
        $display("FAIL op=%b got %b exp %b", op, ctrl, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
