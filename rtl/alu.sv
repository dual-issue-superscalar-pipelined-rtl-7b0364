// alu: 32-bit arithmetic/logic unit of one issue lane.
//
// Bit 3 of the control code inverts operand B and supplies the carry-in, so
// one adder gives both A+B and A-B. Bits 2:0 select the result: 000 AND,
// 001 OR, 010 sum, 011 sign bit of the sum (set-less-than when subtracting),
// 100 B shifted left by shamt (SLL), 101 product A*B, 110 quotient A/B.
// The operation set and the inverted-B scheme follow the design description.
// Code 111 and division by zero return 0; those two are this design's choice.
// Purely combinational: the result is valid in the same cycle. The zero flag
// is y == 0.
module alu
  import mips_pkg::*;
(
  input  word_t      a,
  input  word_t      b,
  input  alu_ctrl_e  f,
  input  logic [4:0] shamt,
  output word_t      y,
  output logic       zero
);

  word_t b_eff;
  word_t sum;

  always_comb begin
    b_eff = f[3] ? ~b : b;
    sum   = a + b_eff + {31'b0, f[3]};
    unique case (f[2:0])
      3'b000:  y = a & b_eff;
      3'b001:  y = a | b_eff;
      3'b010:  y = sum;
      3'b011:  y = {31'b0, sum[31]};
      3'b100:  y = b_eff << shamt;
      3'b101:  y = a * b;
      3'b110:  y = (b == '0) ? '0 : a / b;
      default: y = '0;
    endcase
  end

  assign zero = (y == '0);

endmodule
