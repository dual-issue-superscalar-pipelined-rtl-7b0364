// tb_alu_decoder: checks the ALUOp/funct table entry by entry.
module tb_alu_decoder;
  import mips_pkg::*;
  logic [5:0] funct;
  aluop_e aluop;
  alu_ctrl_e alucontrol;
  int checks = 0, failures = 0;

  alu_decoder dut (.funct, .aluop, .alucontrol);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic one(aluop_e op, logic [5:0] fn, logic [3:0] exp);
    aluop = op; funct = fn; #1;
    checks++;
    if (alucontrol !== exp) begin
      failures++;
      $display("FAIL aluop=%b funct=%b got %b exp %b", op, fn, alucontrol, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) begin
      one(ALUOP_ADD, 6'(i), 4'b0010);
      one(ALUOP_SUB, 6'(i), 4'b1010);
      one(ALUOP_SLT, 6'(i), 4'b1011);
    end
    one(ALUOP_FUNCT, 6'b100000, 4'b0010);
    one(ALUOP_FUNCT, 6'b100010, 4'b1010);
    one(ALUOP_FUNCT, 6'b100100, 4'b0000);
    one(ALUOP_FUNCT, 6'b100101, 4'b0001);
    one(ALUOP_FUNCT, 6'b101010, 4'b1011);
    one(ALUOP_FUNCT, 6'b000000, 4'b0010);   // NOP funct falls back to add
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
