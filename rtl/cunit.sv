// cunit: control unit of the multicycle MIPS processor.
//
// Built around a microcode sequencer: each state reads one 18-bit microword
// whose fields are brought out as the datapath control signals. Two pieces of
// logic sit beside the sequencer, as specified: the ALU decoder turns ALUOp
// and the low four funct bits into ALUControl, and PCEnable is
// PCWrite | (PCWriteCond & Zero), so beq loads the PC only when the ALU
// compare gives Zero. Reset (asynchronous, active high) returns to State 0.
// All outputs are combinational functions of the current state (and of
// Funct/Zero) and are valid for the whole clock cycle. State is an extra
// observation output not in the unit's specified port list.
module cunit
  import mips_mc_pkg::*;
(
  input  logic       Clk,
  input  logic       Reset,
  input  logic [5:0] Op,
  input  logic [3:0] Funct,
  input  logic       Zero,
  output logic [1:0] PCSource,
  output logic [2:0] ALUControl,
  output logic [1:0] ALUSrcB,
  output logic       ALUSrcA,
  output logic       RegWrite,
  output logic       RegDst,
  output logic       IorD,
  output logic       MemRead,
  output logic       MemWrite,
  output logic       MemtoReg,
  output logic       IRWrite,
  output logic       PCEnable,
  output logic [3:0] State
);

  microword_t uw;

  microcode_sequencer u_seq (
    .clk  (Clk),
    .reset(Reset),
    .op   (Op),
    .uword(uw),
    .state(State)
  );

  alu_decoder u_aludec (
    .alu_op     (uw.alu_op),
    .funct      (Funct),
    .alu_control(ALUControl)
  );

  assign PCSource = uw.pc_source;
  assign ALUSrcB  = uw.alu_src_b;
  assign ALUSrcA  = uw.alu_src_a;
  assign RegWrite = uw.reg_write;
  assign RegDst   = uw.reg_dst;
  assign IorD     = uw.i_or_d;
  assign MemRead  = uw.mem_read;
  assign MemWrite = uw.mem_write;
  assign MemtoReg = uw.mem_to_reg;
  assign IRWrite  = uw.ir_write;
  assign PCEnable = uw.pc_write | (uw.pc_write_cond & Zero);

endmodule
