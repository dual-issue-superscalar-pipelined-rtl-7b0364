// pipe_reg_fd: fetch/decode pipeline register of one issue lane.
//
// Captures the lane's fetched instruction and a PC value on the rising edge
// when en (= not StallD) is high. clr (branch taken or jump in decode)
// loads zeros, i.e. a NOP, squashing the wrongly fetched pair; it acts only
// while enabled, as in the design description. reset is synchronous and
// acts whether or not the register is enabled (this design's choice, so a
// stall seen during reset cannot keep stale contents).
module pipe_reg_fd
  import mips_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  logic  en,
  input  logic  clr,
  input  word_t instrf,
  input  word_t pcf_in,
  output word_t instrd,
  output word_t pcd
);

  always_ff @(posedge clk) begin
    if (reset) begin
      instrd <= '0;
      pcd    <= '0;
    end else if (en) begin
      if (clr) begin
        instrd <= '0;
        pcd    <= '0;
      end else begin
        instrd <= instrf;
        pcd    <= pcf_in;
      end
    end
  end

endmodule
