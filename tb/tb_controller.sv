// tb_controller: checks the controller's decoded fields, ALU control and
// branch-taken output for each instruction type, with EqualD high and low.
module tb_controller;
  import mips_pkg::*;
  logic [5:0] op, funct;
  logic equald;
  ctrl_t ctrl;
  alu_ctrl_e alucontrol;
  logic pcsrc;
  int checks = 0, failures = 0;

  controller dut (.op, .funct, .equald, .ctrl, .alucontrol, .pcsrc);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic one(logic [5:0] o, logic [5:0] fn, logic eq,
                     logic rw, logic ms, logic mw, logic br, logic jp, logic [3:0] ac, logic ps);
    op = o; funct = fn; equald = eq; #1;
    checks++;
    if (ctrl.regwrite !== rw || ctrl.memtoreg !== ms || ctrl.memwrite !== mw ||
        ctrl.branch !== br || ctrl.jump !== jp || alucontrol !== ac || pcsrc !== ps) begin
      failures++;
      $display("FAIL op=%b fn=%b eq=%b: ctrl=%b alu=%b pcsrc=%b", o, fn, eq, ctrl, alucontrol, pcsrc);
    end
  endtask

  initial begin
    for (int e = 0; e < 2; e++) begin
      one(6'b000000, 6'b100000, e[0], 1, 0, 0, 0, 0, 4'b0010, 0);  // add
      one(6'b000000, 6'b100010, e[0], 1, 0, 0, 0, 0, 4'b1010, 0);  // sub
      one(6'b000000, 6'b100100, e[0], 1, 0, 0, 0, 0, 4'b0000, 0);  // and
      one(6'b000000, 6'b100101, e[0], 1, 0, 0, 0, 0, 4'b0001, 0);  // or
      one(6'b000000, 6'b101010, e[0], 1, 0, 0, 0, 0, 4'b1011, 0);  // slt
      one(6'b100011, 6'b000000, e[0], 1, 1, 0, 0, 0, 4'b0010, 0);  // lw
      one(6'b101011, 6'b000000, e[0], 0, 0, 1, 0, 0, 4'b0010, 0);  // sw
      one(6'b000100, 6'b000000, e[0], 0, 0, 0, 1, 0, 4'b1010, e[0]); // beq
      one(6'b001000, 6'b000000, e[0], 1, 0, 0, 0, 0, 4'b0010, 0);  // addi
      one(6'b000010, 6'b000000, e[0], 0, 0, 0, 0, 1, 4'b0010, 0);  // j
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
