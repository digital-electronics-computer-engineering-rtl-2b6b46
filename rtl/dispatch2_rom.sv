// dispatch2_rom: 64 x 4 dispatch table used after the memory-address state.
//
// Combinational lookup addressed by the 6-bit opcode: lw (23h) goes to
// state 3 (memory read), sw (2Bh) to state 5 (memory write). All other
// opcodes read 0, the table's default. These two entries and the default are
// exactly as specified for the processor.
module dispatch2_rom
  import mips_mc_pkg::*;
(
  input  logic [5:0] op,
  output logic [3:0] addr
);

  always_comb begin
    unique case (op)
      OP_LW:   addr = S_MEMRD;
      OP_SW:   addr = S_MEMWR;
      default: addr = 4'h0;
    endcase
  end

endmodule
