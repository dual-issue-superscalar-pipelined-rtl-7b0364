// alu_decoder: turns the main decoder's ALUOp and an R-type funct field into
// the 4-bit ALU control code.
//
// ALUOp 00 -> add (loads, stores, ADDI), 01 -> subtract (BEQ), 11 -> set
// less than, 10 -> look at funct: ADD, SUB, AND, OR, SLT. This table follows
// the design description. An unlisted funct gives add, so the all-zero NOP
// computes $0+$0 into $0 (this design's choice). Combinational.
module alu_decoder
  import mips_pkg::*;
(
  input  logic [5:0] funct,
  input  aluop_e     aluop,
  output alu_ctrl_e  alucontrol
);

  always_comb begin
    unique case (aluop)
      ALUOP_ADD: alucontrol = ALU_ADD;
      ALUOP_SUB: alucontrol = ALU_SUB;
      ALUOP_SLT: alucontrol = ALU_SLT;
      default: begin
        unique case (funct)
          FN_ADD:  alucontrol = ALU_ADD;
          FN_SUB:  alucontrol = ALU_SUB;
          FN_AND:  alucontrol = ALU_AND;
          FN_OR:   alucontrol = ALU_OR;
          FN_SLT:  alucontrol = ALU_SLT;
          default: alucontrol = ALU_ADD;
        endcase
      end
    endcase
  end

endmodule
