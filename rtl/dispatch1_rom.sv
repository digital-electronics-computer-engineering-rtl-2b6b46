// dispatch1_rom: 64 x 4 dispatch table used after the decode state.
//
// Combinational lookup addressed by the 6-bit opcode. It sends each supported
// instruction class to the first state of its own microcode sequence:
// R-type -> 6, lw and sw -> 2 (address computation), beq -> 8, j -> 9,
// addi -> A. Every other opcode reads 0, so an unknown instruction simply
// returns to fetch. The entries follow from the state meanings of the
// microprogram; only the table's size and default of 0 are specified for it.
module dispatch1_rom
  import mips_mc_pkg::*;
(
  input  logic [5:0] op,
  output logic [3:0] addr
);

  always_comb begin
    unique case (op)
      OP_RTYPE: addr = S_EXECUTE;
      OP_LW:    addr = S_MEMADR;
      OP_SW:    addr = S_MEMADR;
      OP_BEQ:   addr = S_BRANCH;
      OP_J:     addr = S_JUMP;
      OP_ADDI:  addr = S_ADDIEX;
      default:  addr = 4'h0;
    endcase
  end

endmodule
