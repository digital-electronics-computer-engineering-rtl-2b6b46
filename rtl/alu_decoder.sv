// alu_decoder: derives ALUControl from the microword's ALUOp and Funct.
//
// ALUOp 00 asks for an add (addresses, PC + 4, addi), 01 for a subtract
// (beq compare), and 10 (or 11) for the operation named by the low four
// bits of the R-type funct field: 0000 add, 0010 sub, 0100 and, 0101 or,
// 1010 slt. Unknown funct codes default to add. Combinational. Only the
// inputs and outputs are specified; this encoding is the common one for
// this processor and is this design's choice.
module alu_decoder
  import mips_mc_pkg::*;
(
  input  logic [1:0] alu_op,
  input  logic [3:0] funct,
  output logic [2:0] alu_control
);

  always_comb begin
    unique case (alu_op)
      ALUOP_ADD: alu_control = ALU_ADD;
      ALUOP_SUB: alu_control = ALU_SUB;
      default: begin
        unique case (funct)
          4'b0000: alu_control = ALU_ADD;
          4'b0010: alu_control = ALU_SUB;
          4'b0100: alu_control = ALU_AND;
          4'b0101: alu_control = ALU_OR;
          4'b1010: alu_control = ALU_SLT;
          default: alu_control = ALU_ADD;
        endcase
      end
    endcase
  end

endmodule
