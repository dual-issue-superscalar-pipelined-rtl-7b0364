// pipe_reg_de: decode/execute pipeline register of one issue lane.
//
// Carries the lane's controls (RegWrite, MemtoReg, MemWrite, ALU control,
// ALUSrc, RegDst), both register operands, the Rs/Rt/Rd fields, the
// sign-extended immediate and the shift amount (see mips_pkg::de_t).
// On the rising edge it loads the decode-stage values, or all zeros (a
// bubble) when clr (FlushE) or reset is high; both are synchronous, as in
// the design description. It is never stalled.
module pipe_reg_de
  import mips_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic clr,
  input  de_t  d,
  output de_t  e
);

  always_ff @(posedge clk) begin
    if (reset || clr) e <= '0;
    else              e <= d;
  end

endmodule
