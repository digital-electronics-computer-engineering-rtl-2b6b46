// tb_microcode_sequencer: runs the sequencer through the state sequence of
// every instruction class and checks the state and microword each cycle.
// The opcode is presented from the decode state on, as the instruction
// register would. Expected sequences: R-type 0 1 6 7, lw 0 1 2 3 4,
// sw 0 1 2 5, beq 0 1 8, j 0 1 9, addi 0 1 A B; also checks that reset
// returns to state 0 and that an unknown opcode returns to fetch.
`timescale 1ns/1ps
module tb_microcode_sequencer;
  import mips_mc_pkg::*;
  `include "ucode_table.svh"

  logic clk = 0, reset = 1;
  logic [5:0] op = 0;
  microword_t uword;
  logic [3:0] state;
  int checks = 0, failures = 0;

  microcode_sequencer dut (.clk(clk), .reset(reset), .op(op), .uword(uword), .state(state));

  always #5 clk = ~clk;

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Called in the middle of a state-0 cycle; leaves in the middle of the
  // next state-0 cycle.
  task automatic run(logic [5:0] opcode, logic [3:0] seq_exp [$]);
    foreach (seq_exp[i]) begin
      checks++;
      if (state !== seq_exp[i] || !ucode_match(uword, int'(seq_exp[i]))) begin
        failures++; $display("op %h step %0d: state %h word %05h, expected state %h", opcode, i, state, uword, seq_exp[i]);
      end
      if (i == 0) op = opcode;   // instruction register loads at the end of fetch
      @(negedge clk);
    end
    checks++;
    if (state !== 4'h0) begin failures++; $display("op %h: did not return to fetch", opcode); end
  endtask

  initial begin
    op = 6'h3F;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    run(6'h23, '{4'h0, 4'h1, 4'h2, 4'h3, 4'h4});
    run(6'h2B, '{4'h0, 4'h1, 4'h2, 4'h5});
    run(6'h00, '{4'h0, 4'h1, 4'h6, 4'h7});
    run(6'h04, '{4'h0, 4'h1, 4'h8});
    run(6'h02, '{4'h0, 4'h1, 4'h9});
    run(6'h08, '{4'h0, 4'h1, 4'hA, 4'hB});
    run(6'h3F, '{4'h0, 4'h1});
    // Asynchronous reset mid-instruction.
    op = 6'h23;
    @(negedge clk); @(negedge clk);
    #1 reset = 1;
    #1 checks++;
    if (state !== 4'h0) begin failures++; $display("reset did not clear the state"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
