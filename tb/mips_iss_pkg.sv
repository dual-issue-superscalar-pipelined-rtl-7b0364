// mips_iss_pkg: instruction-level reference model for the dual-issue core's
// testbenches.
//
// Executes a program one instruction at a time with the architectural
// rules the pipeline implements: instruction pairs start at even word
// addresses; a BEQ or J in the first word of a pair redirects after the
// second word of the pair has executed (that word acts as a delay slot);
// BEQ and J in the second word do nothing. Register $0 reads zero. The
// 64-word instruction and data memories are indexed by address bits [7:2].
// Execution stops at a J that targets its own address (a halt loop), on
// reaching word address stop_pc, or after max_steps instructions. written_r / written_m mark what the program
// wrote, so a testbench compares only state with a defined value.
package mips_iss_pkg;

  typedef logic [31:0] w32_t;

  class mips_iss;
    w32_t imem [64];
    w32_t regs [32];
    w32_t dmem [64];
    bit   written_r [32];
    bit   written_m [64];
    int   executed;
    int   branches_taken;
    int   jumps;

    function new();
      foreach (regs[i]) begin regs[i] = '0; written_r[i] = 0; end
      foreach (dmem[i]) begin dmem[i] = '0; written_m[i] = 0; end
      foreach (imem[i]) imem[i] = '0;
      executed = 0; branches_taken = 0; jumps = 0;
    endfunction

    // Execute one non-control instruction.
    function void exec(w32_t ins);
      logic [5:0] op, fn;
      int rs, rt, rd;
      w32_t a, b, simm, r;
      op = ins[31:26]; fn = ins[5:0];
      rs = int'(ins[25:21]); rt = int'(ins[20:16]); rd = int'(ins[15:11]);
      a = (rs == 0) ? '0 : regs[rs];
      b = (rt == 0) ? '0 : regs[rt];
      simm = {{16{ins[15]}}, ins[15:0]};
      executed++;
      case (op)
        6'h00: begin
          case (fn)
            6'h22:   r = a - b;
            6'h24:   r = a & b;
            6'h25:   r = a | b;
            6'h2a:   r = ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
            default: r = a + b;
          endcase
          if (rd != 0) begin regs[rd] = r; written_r[rd] = 1; end
        end
        6'h08: if (rt != 0) begin regs[rt] = a + simm; written_r[rt] = 1; end
        6'h23: if (rt != 0) begin regs[rt] = dmem[(a + simm) >> 2 & 63]; written_r[rt] = 1; end
        6'h2b: begin dmem[(a + simm) >> 2 & 63] = b; written_m[(a + simm) >> 2 & 63] = 1; end
        default: ;
      endcase
    endfunction

    function void run(int max_steps, int stop_pc = -1);
      int pc, target;
      bit redirect;
      w32_t ins;
      pc = 0;
      while (executed < max_steps && pc != stop_pc) begin
        ins = imem[pc];
        redirect = 0;
        target = 0;
        if ((pc % 2) == 0 && ins[31:26] == 6'h04) begin
          w32_t a, b;
          a = (ins[25:21] == 0) ? '0 : regs[ins[25:21]];
          b = (ins[20:16] == 0) ? '0 : regs[ins[20:16]];
          executed++;
          if (a == b) begin
            redirect = 1;
            target = (pc + 1 + int'($signed(ins[15:0]))) & 63;
            branches_taken++;
          end
        end else if ((pc % 2) == 0 && ins[31:26] == 6'h02) begin
          executed++;
          redirect = 1;
          target = int'(ins[25:0]) & 63;
          jumps++;
        end else if (ins[31:26] != 6'h04 && ins[31:26] != 6'h02) begin
          exec(ins);
        end else begin
          executed++;
        end
        if (redirect) begin
          exec(imem[(pc + 1) & 63]);
          if (target == pc) return;
          pc = target;
        end else begin
          pc = (pc + 1) & 63;
        end
      end
    endfunction
  endclass

endpackage
