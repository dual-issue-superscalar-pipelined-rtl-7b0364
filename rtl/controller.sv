// controller: control unit of one issue lane, used once per lane.
//
// Combines the main decoder (opcode -> control word) and the ALU decoder
// (ALUOp + funct -> ALU control), and forms the branch-taken signal
// pcsrc = Branch & EqualD, where EqualD comes from the decode-stage
// comparator in the datapath. Structure as in the design description; the
// two lanes' identical controllers are one module here. Combinational.
module controller
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  input  logic       equald,
  output ctrl_t      ctrl,
  output alu_ctrl_e  alucontrol,
  output logic       pcsrc
);

  main_decoder u_md (.op(op), .ctrl(ctrl));
  alu_decoder  u_ad (.funct(funct), .aluop(ctrl.aluop), .alucontrol(alucontrol));

  assign pcsrc = ctrl.branch & equald;

endmodule
