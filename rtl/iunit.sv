// iunit: instruction-address unit (the program counter).
//
// The PC register loads on the rising edge when PCEnable is high and is
// cleared to 0 by the asynchronous, active-high Reset, so execution starts at
// address 0. Its next value is chosen by PCSource:
//   00 ALUResult (PC + 4 computed during fetch)
//   01 ALUOut    (branch target computed during decode)
//   10 jump address {PC[31:28], Instruction[25:0], 00}
//   11 unused; selects ALUResult (this design's choice)
module iunit (
  input  logic        Clk,
  input  logic        Reset,
  input  logic [31:0] Instruction,
  input  logic [31:0] ALUResult,
  input  logic [31:0] ALUOut,
  input  logic        PCEnable,
  input  logic [1:0]  PCSource,
  output logic [31:0] PC
);

  logic [31:0] pc_next, jump_addr;

  assign jump_addr = {PC[31:28], Instruction[25:0], 2'b00};

  always_comb begin
    unique case (PCSource)
      2'b01:   pc_next = ALUOut;
      2'b10:   pc_next = jump_addr;
      default: pc_next = ALUResult;
    endcase
  end

  always_ff @(posedge Clk or posedge Reset) begin
    if (Reset)         PC <= '0;
    else if (PCEnable) PC <= pc_next;
  end

endmodule
