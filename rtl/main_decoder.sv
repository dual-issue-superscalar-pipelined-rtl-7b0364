// main_decoder: opcode to control word for one issue lane.
//
// Supported opcodes and their controls (RegWrite RegDst ALUSrc Branch
// MemWrite MemtoReg Jump ALUOp) follow the design description:
//   R-type 1 1 0 0 0 0 0 10    LW   1 0 1 0 0 1 0 00
//   SW     0 0 1 0 1 0 0 00    BEQ  0 0 0 1 0 0 0 01
//   ADDI   1 0 1 0 0 0 0 00    J    0 0 0 0 0 0 1 00
// Any other opcode gives an all-zero word, so it writes nothing (this
// design's choice). Combinational.
module main_decoder
  import mips_pkg::*;
(
  input  logic [5:0] op,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '0;
    unique case (op)
      OP_RTYPE: begin ctrl.regwrite = 1'b1; ctrl.regdst = 1'b1; ctrl.aluop = ALUOP_FUNCT; end
      OP_LW:    begin ctrl.regwrite = 1'b1; ctrl.alusrc = 1'b1; ctrl.memtoreg = 1'b1; end
      OP_SW:    begin ctrl.alusrc = 1'b1; ctrl.memwrite = 1'b1; end
      OP_BEQ:   begin ctrl.branch = 1'b1; ctrl.aluop = ALUOP_SUB; end
      OP_ADDI:  begin ctrl.regwrite = 1'b1; ctrl.alusrc = 1'b1; end
      OP_J:     begin ctrl.jump = 1'b1; end
      default:  ctrl = '0;
    endcase
  end

endmodule
