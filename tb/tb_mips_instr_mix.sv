// tb_mips_instr_mix: second program for the whole processor, covering what the
// nine-instruction test program does not: add, and, slt (both outcomes),
// negative immediates, a beq that is not taken and one that skips an
// instruction. Program (tb/instr_mix_program.hex):
//   00 addi $t0,$0,7        20 sw   $s2,0x40($0)
//   04 addi $s0,$0,5        24 lw   $s6,0x40($0)
//   08 addi $s1,$0,-3       28 sub  $s7,$s6,$s0
//   0C add  $s2,$s0,$s1     2C beq  $s7,$s1,+1      (taken)
//   10 and  $s3,$s0,$s1     30 addi $t0,$0,0xBAD    (skipped)
//   14 slt  $s4,$s1,$s0     34 or   $t1,$s3,$s4
//   18 slt  $s5,$s0,$s1     38 done: j done
//   1C beq  $s0,$s1,+2      (not taken)
// Expected values were worked out by hand. The test also checks the cycle
// count: with 4 cycles per addi/R-type/sw, 5 per lw and 3 per beq/j, the
// fetch of "done" starts 51 cycles after the first fetch.
`timescale 1ns/1ps
module tb_mips_instr_mix;

  logic        Clk = 1'b0;
  logic        Reset = 1'b1;
  logic [31:0] PC, Instruction, ALUResult, ALUOut, WriteData;
  logic [3:0]  State;
  logic        Zero, MemWrite;

  int checks = 0, failures = 0;
  int cycle = 0, done_cycle = -1;
  int n_beq = 0, n_beq_taken = 0;

  mips_multicycle dut (.*);

  always #5 Clk = ~Clk;

  initial begin
    repeat (500) @(posedge Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s = %h, expected %h", what, got, exp);
    end
  endtask

  always @(negedge Clk) begin
    if (!Reset) begin
      if (State == 4'h0 && PC == 32'h38 && done_cycle < 0) done_cycle = cycle;
      if (State == 4'h8) begin
        n_beq++;
        if (dut.PCEnable) n_beq_taken++;
      end
      cycle++;
    end
  end

  initial begin
    for (int i = 0; i < 64; i++) dut.u_munit.u_mem.mem[i] = 32'h0;
    $readmemh("tb/instr_mix_program.hex", dut.u_munit.u_mem.mem);
    repeat (2) @(posedge Clk);
    @(negedge Clk) Reset = 1'b0;
    repeat (80) @(negedge Clk);

    check("$t0", dut.u_eunit.u_rf.rf[8],  32'h7);
    check("$s0", dut.u_eunit.u_rf.rf[16], 32'h5);
    check("$s1", dut.u_eunit.u_rf.rf[17], 32'hFFFFFFFD);
    check("$s2", dut.u_eunit.u_rf.rf[18], 32'h2);
    check("$s3", dut.u_eunit.u_rf.rf[19], 32'h5);
    check("$s4", dut.u_eunit.u_rf.rf[20], 32'h1);
    check("$s5", dut.u_eunit.u_rf.rf[21], 32'h0);
    check("$s6", dut.u_eunit.u_rf.rf[22], 32'h2);
    check("$s7", dut.u_eunit.u_rf.rf[23], 32'hFFFFFFFD);
    check("$t1", dut.u_eunit.u_rf.rf[9],  32'h5);
    check("mem[0x40]", dut.u_munit.u_mem.mem[16], 32'h2);
    check("cycles to done", 32'(done_cycle), 32'd51);
    check("beq executed", 32'(n_beq), 32'd2);
    check("beq taken", 32'(n_beq_taken), 32'd1);
    check("PC in done loop", {31'b0, PC == 32'h38 || PC == 32'h3C}, 32'd1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
