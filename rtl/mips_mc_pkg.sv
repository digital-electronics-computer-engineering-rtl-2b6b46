// mips_mc_pkg: types and constants shared by the multicycle MIPS processor.
//
// microword_t is one 18-bit word of the microcode storage. Its fields are in
// the column order of the microcode table (ALUOp in the two top bits, Seq in
// the two bottom bits), so the word for State 0 reads 18'h02148. The Seq
// codes, the opcodes of the supported instructions and the ALU control codes
// are also defined here. The Seq codes and opcodes follow the processor's
// specification; the ALU control encoding is the usual one for this ALU and is
// this design's choice.
package mips_mc_pkg;

  // Microprogram sequencing control (the Seq field).
  typedef enum logic [1:0] {
    SEQ_NEXT      = 2'b00,  // go to state + 1
    SEQ_FETCH     = 2'b01,  // go to state 0
    SEQ_DISPATCH1 = 2'b10,  // go to Dispatch1[Op]
    SEQ_DISPATCH2 = 2'b11   // go to Dispatch2[Op]
  } seq_t;

  typedef struct packed {
    logic [1:0] alu_op;         // 17:16
    logic       alu_src_a;      // 15
    logic [1:0] alu_src_b;      // 14:13
    logic       reg_write;      // 12
    logic       reg_dst;        // 11
    logic       mem_to_reg;     // 10
    logic       i_or_d;         // 9
    logic       mem_read;       // 8
    logic       mem_write;      // 7
    logic       ir_write;       // 6
    logic [1:0] pc_source;      // 5:4
    logic       pc_write;       // 3
    logic       pc_write_cond;  // 2
    seq_t       seq;            // 1:0
  } microword_t;


  // Opcodes (Instruction[31:26]).
  localparam logic [5:0] OP_RTYPE = 6'h00;
  localparam logic [5:0] OP_J     = 6'h02;
  localparam logic [5:0] OP_BEQ   = 6'h04;
  localparam logic [5:0] OP_ADDI  = 6'h08;
  localparam logic [5:0] OP_LW    = 6'h23;
  localparam logic [5:0] OP_SW    = 6'h2B;

  // Microprogram states.
  localparam logic [3:0] S_FETCH    = 4'h0;
  localparam logic [3:0] S_DECODE   = 4'h1;
  localparam logic [3:0] S_MEMADR   = 4'h2;
  localparam logic [3:0] S_MEMRD    = 4'h3;
  localparam logic [3:0] S_MEMWB    = 4'h4;
  localparam logic [3:0] S_MEMWR    = 4'h5;
  localparam logic [3:0] S_EXECUTE  = 4'h6;
  localparam logic [3:0] S_ALUWB    = 4'h7;
  localparam logic [3:0] S_BRANCH   = 4'h8;
  localparam logic [3:0] S_JUMP     = 4'h9;
  localparam logic [3:0] S_ADDIEX   = 4'hA;
  localparam logic [3:0] S_ADDIWB   = 4'hB;

  // ALUOp field.
  localparam logic [1:0] ALUOP_ADD   = 2'b00;
  localparam logic [1:0] ALUOP_SUB   = 2'b01;
  localparam logic [1:0] ALUOP_FUNCT = 2'b10;

  // ALUControl codes: bit 2 inverts B (and carries in 1), bits 1:0 select
  // AND, OR, sum, set-less-than.
  typedef enum logic [2:0] {
    ALU_AND = 3'b000,
    ALU_OR  = 3'b001,
    ALU_ADD = 3'b010,
    ALU_SUB = 3'b110,
    ALU_SLT = 3'b111
  } alu_ctrl_t;

endpackage
