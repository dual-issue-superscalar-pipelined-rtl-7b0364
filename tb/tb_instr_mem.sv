// tb_instr_mem: reads every word address of the default program image and
// checks the {word a, word a+1} pair, including the wrap from 63 to 0 and
// the zero fill past the end of the image.
module tb_instr_mem;
  import mips_pkg::*;
  logic [5:0] a;
  logic [63:0] rd;
  int checks = 0, failures = 0;
  logic [31:0] img [64];

  instr_mem dut (.a, .rd);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // the 12 words of the default program, written out by hand
    logic [31:0] prog [12] = '{32'h20080001, 32'h20090001, 32'h01098020, 32'h01285022,
                               32'h210b0000, 32'h00000000, 32'h120a0003, 32'h014b5020,
                               32'h08100006, 32'h00000000, 32'h20080007, 32'h20090007};
    foreach (img[i]) img[i] = (i < 12) ? prog[i] : 32'h0;
    for (int i = 0; i < 64; i++) begin
      a = 6'(i); #1;
      checks++;
      if (rd !== {img[i], img[(i + 1) % 64]}) begin
        failures++;
        $display("FAIL a=%0d rd=%h", i, rd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
