// mips_multicycle: multicycle MIPS processor built from four units.
//
// cunit (microcoded control), iunit (program counter), eunit (register file,
// ALU and its registers) and munit (shared instruction/data memory with the
// instruction and data registers) are wired as in the processor's datapath.
// Each instruction takes 3 to 5 clock cycles: fetch, decode, then 1 to 3
// states chosen by the opcode. Supported: lw, sw, add, sub, and, or, slt,
// beq, j and addi. Reset is asynchronous and active high; execution starts
// at address 0 in State 0. The outputs expose the PC, the instruction
// register, the microprogram state, the ALU result and zero flag, ALUOut,
// the store data and the memory write strobe so the processor can be watched
// from outside; that port list is this design's choice.
module mips_multicycle #(
  parameter int unsigned MEM_WORDS = 64
) (
  input  logic        Clk,
  input  logic        Reset,
  output logic [31:0] PC,
  output logic [31:0] Instruction,
  output logic [3:0]  State,
  output logic [31:0] ALUResult,
  output logic        Zero,
  output logic [31:0] ALUOut,
  output logic [31:0] WriteData,
  output logic        MemWrite
);

  logic [1:0]  PCSource, ALUSrcB;
  logic [2:0]  ALUControl;
  logic        ALUSrcA, RegWrite, RegDst, IorD, MemRead, MemtoReg, IRWrite, PCEnable;
  logic [31:0] MemoryData, SrcA, SrcB;

  cunit u_cunit (
    .Clk(Clk), .Reset(Reset),
    .Op(Instruction[31:26]), .Funct(Instruction[3:0]), .Zero(Zero),
    .PCSource(PCSource), .ALUControl(ALUControl), .ALUSrcB(ALUSrcB),
    .ALUSrcA(ALUSrcA), .RegWrite(RegWrite), .RegDst(RegDst), .IorD(IorD),
    .MemRead(MemRead), .MemWrite(MemWrite), .MemtoReg(MemtoReg),
    .IRWrite(IRWrite), .PCEnable(PCEnable), .State(State)
  );

  iunit u_iunit (
    .Clk(Clk), .Reset(Reset), .Instruction(Instruction),
    .ALUResult(ALUResult), .ALUOut(ALUOut),
    .PCEnable(PCEnable), .PCSource(PCSource), .PC(PC)
  );

  eunit u_eunit (
    .Clk(Clk), .Reset(Reset), .Instruction(Instruction),
    .MemoryData(MemoryData), .PC(PC),
    .RegDst(RegDst), .MemtoReg(MemtoReg), .RegWrite(RegWrite),
    .ALUSrcA(ALUSrcA), .ALUSrcB(ALUSrcB), .ALUControl(ALUControl),
    .Zero(Zero), .ALUResult(ALUResult), .ALUOut(ALUOut),
    .WriteData(WriteData), .SrcA(SrcA), .SrcB(SrcB)
  );

  munit #(.MEM_WORDS(MEM_WORDS)) u_munit (
    .Clk(Clk), .Reset(Reset), .PC(PC), .ALUOut(ALUOut),
    .WriteData(WriteData), .IorD(IorD), .MemRead(MemRead),
    .MemWrite(MemWrite), .IRWrite(IRWrite),
    .Instruction(Instruction), .MemoryData(MemoryData)
  );

endmodule
