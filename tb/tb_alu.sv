// tb_alu: checks every ALU operation on directed and random operands
// against results computed here from the operation's definition.
module tb_alu;
  import mips_pkg::*;
  word_t a, b, y;
  alu_ctrl_e f;
  logic [4:0] shamt;
  logic zero;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .f, .shamt, .y, .zero);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t ref_y(alu_ctrl_e op, word_t x, word_t z, logic [4:0] sh);
    case (op)
      ALU_AND:   return x & z;
      ALU_OR:    return x | z;
      ALU_ADD:   return x + z;
      ALU_SUB:   return x - z;
      ALU_SLT:   return {31'b0, (x - z) >> 31 == 1};
      ALU_SLTU0: return (x + z) >> 31;
      ALU_SLL:   return z << sh;
      ALU_MUL:   return x * z;
      ALU_DIV:   return (z == 0) ? 0 : x / z;
      default:   return 0;
    endcase
  endfunction

  task automatic one(alu_ctrl_e op, word_t x, word_t z, logic [4:0] sh);
    word_t exp;
    a = x; b = z; f = op; shamt = sh;
    #1;
    exp = ref_y(op, x, z, sh);
    checks++;
    if (y !== exp || zero !== (exp == 0)) begin
      failures++;
      $display("FAIL op=%b a=%h b=%h sh=%0d y=%h exp=%h zero=%b", op, x, z, sh, y, exp, zero);
    end
  endtask

  initial begin
    alu_ctrl_e ops [9] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_SUB, ALU_SLT, ALU_SLTU0, ALU_SLL, ALU_MUL, ALU_DIV};
    one(ALU_ADD, 32'd5, 32'd7, 0);
    one(ALU_SUB, 32'd7, 32'd7, 0);          // zero flag
    one(ALU_SLT, 32'hFFFF_FFFF, 32'd1, 0);  // -1 < 1
    one(ALU_SLT, 32'd3, 32'd2, 0);
    one(ALU_SLL, 32'd0, 32'h0000_0003, 5'd4);
    one(ALU_DIV, 32'd100, 32'd7, 0);
    one(ALU_DIV, 32'd100, 32'd0, 0);
    one(ALU_MUL, 32'd1234, 32'd5678, 0);
    for (int i = 0; i < 2000; i++)
      one(ops[$urandom_range(8)], $urandom, ($urandom_range(3) == 0) ? $urandom_range(40) : $urandom,
          5'($urandom));
    // exact expected values, not only the reference function
    a = 32'd5; b = 32'd7; f = ALU_SUB; shamt = 0; #1;
    checks++; if (y != 32'hFFFF_FFFE) begin failures++; $display("FAIL 5-7"); end
    f = ALU_SLT; #1;
    checks++; if (y != 32'd1) begin failures++; $display("FAIL slt 5<7"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
