// next_pc: fetch program counter and its next-value selection.
//
// The PC addresses an instruction pair, so the sequential successor is
// PC+8. A taken BEQ in lane 1 (pcsrc) goes to PC_D+4 + (sign-extended
// immediate << 2), where PC_D+4 is lane 1's decode-stage PC+4. A J in lane 1
// goes to {PC_F+8 [31:28], target, 2'b00}; the jump wins over the branch.
// Only lane 1 steers the PC. The register loads when en (= not StallF) is
// high and resets asynchronously to RESET_PC. All of this follows the
// design description, including the asynchronous reset, while the pipeline
// registers reset synchronously (lint notes the mixed use of reset). PC+4 of the fetch PC is also given out: lane 1
// carries it to decode as its branch base.
module next_pc
  import mips_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        en,
  input  logic        pcsrc,
  input  logic        jump,
  input  word_t       pcplus4d,
  input  word_t       signimmd,
  input  logic [25:0] jaddr,
  output word_t       pcf,
  output word_t       pcplus4f,
  output word_t       pcplus8f
);

  word_t pcbranch, pcnext;

  assign pcplus4f = pcf + 32'd4;
  assign pcplus8f = pcf + 32'd8;
  assign pcbranch = pcplus4d + {signimmd[29:0], 2'b00};

  always_comb begin
    if (jump)       pcnext = {pcplus8f[31:28], jaddr, 2'b00};
    else if (pcsrc) pcnext = pcbranch;
    else            pcnext = pcplus8f;
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset)   pcf <= RESET_PC;
    else if (en) pcf <= pcnext;
  end

endmodule
