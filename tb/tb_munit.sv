// tb_munit: random control and data sequences against a model of the memory
// unit: the address is PC or ALUOut by IorD, writes happen at the edge when
// MemWrite, the instruction register loads with IRWrite and the memory data
// register with MemRead, both from the word addressed in that cycle.
`timescale 1ns/1ps
module tb_munit;
  logic Clk = 0, Reset = 1, IorD, MemRead, MemWrite, IRWrite;
  logic [31:0] PC, ALUOut, WriteData, Instruction, MemoryData;
  logic [31:0] mem [64];
  logic [31:0] ir_m, mdr_m, a;
  int checks = 0, failures = 0;

  munit dut (.*);

  always #5 Clk = ~Clk;

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    IorD = 0; MemRead = 0; MemWrite = 0; IRWrite = 0; PC = 0; ALUOut = 0; WriteData = 0;
    @(posedge Clk); #1 checks++;
    if (Instruction !== 0 || MemoryData !== 0) begin failures++; $display("registers not reset"); end
    @(negedge Clk) Reset = 0;
    ir_m = 0; mdr_m = 0;
    // Fill memory through the ALUOut path.
    for (int i = 0; i < 64; i++) begin
      IorD = 1; MemWrite = 1; ALUOut = 32'(i * 4); WriteData = $urandom; mem[i] = WriteData;
      @(negedge Clk);
    end
    for (int n = 0; n < 3000; n++) begin
      IorD = $urandom_range(0, 1); MemRead = $urandom_range(0, 1);
      MemWrite = ($urandom_range(0, 3) == 0); IRWrite = $urandom_range(0, 1);
      PC = {24'b0, 6'($urandom), 2'b00}; ALUOut = {24'b0, 8'($urandom)}; WriteData = $urandom;
      a = IorD ? ALUOut : PC;
      @(posedge Clk);
      if (IRWrite) ir_m = mem[a[7:2]];
      if (MemRead) mdr_m = mem[a[7:2]];
      if (MemWrite) mem[a[7:2]] = WriteData;
      @(negedge Clk) checks++;
      if (Instruction !== ir_m || MemoryData !== mdr_m) begin
        failures++; $display("cycle %0d: IR %h MDR %h, expected %h %h", n, Instruction, MemoryData, ir_m, mdr_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
