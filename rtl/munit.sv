// munit: memory unit of the multicycle MIPS processor.
//
// The address mux (IorD) sends the PC (instruction fetch) or ALUOut (lw/sw)
// to the shared memory. Store data comes from WriteData, the B register, and
// is written on the rising edge when MemWrite is high. The word read is
// captured at the end of the cycle into the instruction register when IRWrite
// is high, and into the memory data register when MemRead is high; both are
// cleared by the asynchronous, active-high Reset. Instruction and MemoryData
// are those two registers. Using MemRead as the data register's load enable
// is this design's reading of the signal.
module munit #(
  parameter int unsigned MEM_WORDS = 64
) (
  input  logic        Clk,
  input  logic        Reset,
  input  logic [31:0] PC,
  input  logic [31:0] ALUOut,
  input  logic [31:0] WriteData,
  input  logic        IorD,
  input  logic        MemRead,
  input  logic        MemWrite,
  input  logic        IRWrite,
  output logic [31:0] Instruction,
  output logic [31:0] MemoryData
);

  logic [31:0] addr, rd;

  assign addr = IorD ? ALUOut : PC;

  shared_memory #(.WORDS(MEM_WORDS)) u_mem (
    .clk(Clk), .we(MemWrite), .addr(addr), .wd(WriteData), .rd(rd)
  );

  always_ff @(posedge Clk or posedge Reset) begin
    if (Reset) begin
      Instruction <= '0;
      MemoryData  <= '0;
    end else begin
      if (IRWrite) Instruction <= rd;
      if (MemRead) MemoryData  <= rd;
    end
  end

endmodule
