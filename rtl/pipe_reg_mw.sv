// pipe_reg_mw: memory/write-back pipeline register of one issue lane.
//
// Carries RegWrite, MemtoReg, the loaded word, the ALU result and the
// destination register (mips_pkg::mw_t). Loads every rising edge;
// synchronous reset to zero, as in the design description.
module pipe_reg_mw
  import mips_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  mw_t  m,
  output mw_t  w
);

  always_ff @(posedge clk) begin
    if (reset) w <= '0;
    else       w <= m;
  end

endmodule
