// branch_compare: decode-stage equality test for BEQ in one lane.
//
// Each operand is either the register-file value or, when the hazard unit
// asks for it, the own-lane M-stage ALU result (an instruction two ahead
// whose result is not yet written back). The two chosen values are then
// compared. Resolving branches in decode follows the design description.
// Combinational; the result feeds the controller's pcsrc in the same cycle.
module branch_compare
  import mips_pkg::*;
(
  input  word_t rd_a,
  input  word_t rd_b,
  input  word_t aluoutm,
  input  logic  fwd_a,
  input  logic  fwd_b,
  output logic  equal
);

  word_t op_a, op_b;

  assign op_a  = fwd_a ? aluoutm : rd_a;
  assign op_b  = fwd_b ? aluoutm : rd_b;
  assign equal = (op_a == op_b);

endmodule
