// pipe_reg_em: execute/memory pipeline register of one issue lane.
//
// Carries RegWrite, MemtoReg, MemWrite, the ALU result, the store data and
// the destination register (mips_pkg::em_t). Loads every rising edge;
// synchronous reset to zero. Never stalled or flushed, as in the design
// description.
module pipe_reg_em
  import mips_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  em_t  e,
  output em_t  m
);

  always_ff @(posedge clk) begin
    if (reset) m <= '0;
    else       m <= e;
  end

endmodule
