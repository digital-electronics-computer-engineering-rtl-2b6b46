// eunit: execution unit of the multicycle MIPS processor.
//
// Holds the register file, the A and B registers that capture its two read
// ports every cycle, the sign extender and the shift-left-by-2 of the
// immediate, the two ALU source muxes, the ALU and the ALUOut register.
//   RegDst   : write register rt (0) or rd (1)
//   MemtoReg : write ALUOut (0) or MemoryData, the MDR (1)
//   ALUSrcA  : PC (0) or A (1)
//   ALUSrcB  : B (00), 4 (01), sign-extended imm (10), imm << 2 (11)
// A, B and ALUOut load on every rising edge and are cleared by the
// asynchronous, active-high Reset; the register file writes on the edge when
// RegWrite is high. ALUResult and Zero are combinational. WriteData is the B
// register. The mux codes follow the processor's datapath; SrcA and SrcB are
// extra observation outputs.
module eunit
  import mips_mc_pkg::*;
(
  input  logic        Clk,
  input  logic        Reset,
  input  logic [31:0] Instruction,
  input  logic [31:0] MemoryData,
  input  logic [31:0] PC,
  input  logic        RegDst,
  input  logic        MemtoReg,
  input  logic        RegWrite,
  input  logic        ALUSrcA,
  input  logic [1:0]  ALUSrcB,
  input  logic [2:0]  ALUControl,
  output logic        Zero,
  output logic [31:0] ALUResult,
  output logic [31:0] ALUOut,
  output logic [31:0] WriteData,
  output logic [31:0] SrcA,
  output logic [31:0] SrcB
);

  logic [4:0]  wa;
  logic [31:0] wd, rd1, rd2, a_q, b_q, sign_imm, imm_sh2;

  assign wa = RegDst   ? Instruction[15:11] : Instruction[20:16];
  assign wd = MemtoReg ? MemoryData         : ALUOut;

  regfile u_rf (
    .clk(Clk), .we(RegWrite),
    .ra1(Instruction[25:21]), .ra2(Instruction[20:16]),
    .wa(wa), .wd(wd), .rd1(rd1), .rd2(rd2)
  );

  always_ff @(posedge Clk or posedge Reset) begin
    if (Reset) begin
      a_q    <= '0;
      b_q    <= '0;
      ALUOut <= '0;
    end else begin
      a_q    <= rd1;
      b_q    <= rd2;
      ALUOut <= ALUResult;
    end
  end

  assign sign_imm = {{16{Instruction[15]}}, Instruction[15:0]};
  assign imm_sh2  = {sign_imm[29:0], 2'b00};

  assign SrcA = ALUSrcA ? a_q : PC;

  always_comb begin
    unique case (ALUSrcB)
      2'b00: SrcB = b_q;
      2'b01: SrcB = 32'd4;
      2'b10: SrcB = sign_imm;
      2'b11: SrcB = imm_sh2;
    endcase
  end

  alu u_alu (.a(SrcA), .b(SrcB), .f(ALUControl), .y(ALUResult), .zero(Zero));

  assign WriteData = b_q;

endmodule
