// fwd_mux5: five-way operand multiplexer in front of an ALU input.
//
// Select codes: 000 d0 (register file value from the D/E register),
// 001 d1 (own-lane write-back result), 010 d2 (own-lane M-stage ALU result),
// 011 d3 (other-lane write-back result), 100 d4 (other-lane M-stage ALU
// result). The codes follow the design description; codes 101..111 also
// give d4, as the description's s[2]-first decoding does. Combinational.
module fwd_mux5
  import mips_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic [WIDTH-1:0] d2,
  input  logic [WIDTH-1:0] d3,
  input  logic [WIDTH-1:0] d4,
  input  fwd_sel_e         s,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    if (s[2])               y = d4;
    else if (s[1] && s[0])  y = d3;
    else if (s[1])          y = d2;
    else if (s[0])          y = d1;
    else                    y = d0;
  end

endmodule
