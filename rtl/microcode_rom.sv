// microcode_rom: the 16 x 18-bit microcode storage of the control unit.
//
// A purely combinational ROM: the 4-bit state addresses one microword, whose
// fields (see mips_mc_pkg::microword_t) drive the datapath controls and the
// Seq field that tells the sequencer where to go next. Words 0-B are the
// processor's microprogram; don't-care fields are stored as 0, which is what
// makes State 0 read 02148 as specified. Words C-F are unused and hold 0.
//
//   state  word    operation
//   0      02148   fetch: IR <= Mem[PC], PC <= PC + 4
//   1      06002   decode: ALUOut <= PC + (imm << 2), dispatch 1
//   2      0C003   lw/sw address: ALUOut <= A + imm, dispatch 2
//   3      00300   lw read: MDR <= Mem[ALUOut]
//   4      01401   lw write-back: rt <= MDR
//   5      00281   sw: Mem[ALUOut] <= B
//   6      28000   R-type execute (ALUOp = funct)
//   7      01801   R-type write-back: rd <= ALUOut
//   8      18015   beq: A - B, PC <= ALUOut if Zero
//   9      00029   j: PC <= jump address
//   A      0C000   addi execute: ALUOut <= A + imm
//   B      01001   addi write-back: rt <= ALUOut
module microcode_rom
  import mips_mc_pkg::*;
(
  input  logic [3:0] addr,
  output microword_t uword
);

  always_comb begin
    unique case (addr)
      4'h0:    uword = microword_t'(18'h02148);
      4'h1:    uword = microword_t'(18'h06002);
      4'h2:    uword = microword_t'(18'h0C003);
      4'h3:    uword = microword_t'(18'h00300);
      4'h4:    uword = microword_t'(18'h01401);
      4'h5:    uword = microword_t'(18'h00281);
      4'h6:    uword = microword_t'(18'h28000);
      4'h7:    uword = microword_t'(18'h01801);
      4'h8:    uword = microword_t'(18'h18015);
      4'h9:    uword = microword_t'(18'h00029);
      4'hA:    uword = microword_t'(18'h0C000);
      4'hB:    uword = microword_t'(18'h01001);
      default: uword = microword_t'(18'h00000);
    endcase
  end

endmodule
