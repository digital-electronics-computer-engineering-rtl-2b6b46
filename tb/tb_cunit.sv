// tb_cunit: runs the control unit through the instruction stream of the test
// program (addi, j, beq taken, addi, sub, or, sw, lw, j, j) followed by add,
// and, slt and a beq that is not taken. Op and Funct change at the end of each
// fetch, as the instruction register would make them. Every cycle the test
// checks the state against the expected sequence of the instruction class,
// the datapath controls against the microcode table (don't-cares skipped),
// ALUControl against the ALUOp of the state and the funct code, and PCEnable
// against PCWrite | (PCWriteCond & Zero). Zero is random except in the branch
// state, where it decides the branch.
`timescale 1ns/1ps
module tb_cunit;
  `include "ucode_table.svh"

  logic Clk = 0, Reset = 1, Zero = 0;
  logic [5:0] Op = 0;
  logic [3:0] Funct = 0;
  logic [1:0] PCSource, ALUSrcB;
  logic [2:0] ALUControl;
  logic ALUSrcA, RegWrite, RegDst, IorD, MemRead, MemWrite, MemtoReg, IRWrite, PCEnable;
  logic [3:0] State;
  int checks = 0, failures = 0;
  int n_taken = 0, n_not_taken = 0;

  cunit dut (.*);

  always #5 Clk = ~Clk;

  initial begin
    #100000 failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [31:0] instr; logic zero; } step_t;

  function automatic logic [2:0] exp_aluctl(logic [3:0] st, logic [3:0] f);
    case (st)
      4'h6: case (f)
              4'b0000: return 3'b010;
              4'b0010: return 3'b110;
              4'b0100: return 3'b000;
              4'b0101: return 3'b001;
              4'b1010: return 3'b111;
              default: return 3'b010;
            endcase
      4'h8: return 3'b110;
      default: return 3'b010;   // states 0, 1, 2, A add; others don't care
    endcase
  endfunction

  task automatic check_cycle(logic [3:0] st_exp, logic [3:0] f);
    logic [17:0] w;
    logic pce;
    w = {2'b00, ALUSrcA, ALUSrcB, RegWrite, RegDst, MemtoReg, IorD, MemRead,
         MemWrite, IRWrite, PCSource, 4'b0000};
    pce = (st_exp == 4'h0 || st_exp == 4'h9) || (st_exp == 4'h8 && Zero);
    checks++;
    if (State !== st_exp) begin
      failures++; $display("state %h, expected %h", State, st_exp);
      return;
    end
    checks++;
    if (!ucode_match(w, int'(st_exp), 18'h0FFF0)) begin
      failures++; $display("state %h: controls %05h do not match the table", st_exp, w);
    end
    if (st_exp inside {4'h0, 4'h1, 4'h2, 4'h6, 4'h8, 4'hA}) begin
      checks++;
      if (ALUControl !== exp_aluctl(st_exp, f)) begin
        failures++; $display("state %h: ALUControl %b", st_exp, ALUControl);
      end
    end
    checks++;
    if (PCEnable !== pce) begin failures++; $display("state %h: PCEnable %b", st_exp, PCEnable); end
  endtask

  step_t prog [$] = '{
    '{32'h20080042, 0}, '{32'h08000008, 0}, '{32'h1000fff9, 1}, '{32'h20090004, 0},
    '{32'h01095022, 0}, '{32'h01485825, 0}, '{32'hac0b002c, 0}, '{32'h8d2c0028, 0},
    '{32'h08000007, 0}, '{32'h08000007, 0},
    '{32'h01095020, 0}, '{32'h01095024, 0}, '{32'h0109502a, 0}, '{32'h1109fff0, 0}
  };

  initial begin
    @(posedge Clk);
    @(negedge Clk) Reset = 0;
    foreach (prog[k]) begin
      logic [5:0] op;
      logic [3:0] seq [$];
      op = prog[k].instr[31:26];
      case (op)
        6'h00: seq = '{4'h0, 4'h1, 4'h6, 4'h7};
        6'h23: seq = '{4'h0, 4'h1, 4'h2, 4'h3, 4'h4};
        6'h2B: seq = '{4'h0, 4'h1, 4'h2, 4'h5};
        6'h04: seq = '{4'h0, 4'h1, 4'h8};
        6'h02: seq = '{4'h0, 4'h1, 4'h9};
        default: seq = '{4'h0, 4'h1, 4'hA, 4'hB};
      endcase
      foreach (seq[i]) begin
        Zero = (seq[i] == 4'h8) ? prog[k].zero : 1'($urandom);
        if (seq[i] == 4'h8) begin
          if (Zero) n_taken++; else n_not_taken++;
        end
        #1 check_cycle(seq[i], Funct);
        @(posedge Clk);
        if (i == 0) begin Op = op; Funct = prog[k].instr[3:0]; end
        @(negedge Clk);
      end
    end
    checks++;
    if (n_taken == 0 || n_not_taken == 0) begin failures++; $display("branch outcome not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
