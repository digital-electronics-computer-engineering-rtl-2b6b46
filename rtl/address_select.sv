// address_select: chooses the next microprogram address.
//
// A four-input mux steered by the microword's Seq field: 0 selects Plus1
// (the current state + 1), 1 selects the constant 0000 (back to fetch),
// 2 selects Dispatch1[Op] and 3 selects Dispatch2[Op]. The two dispatch
// tables are instantiated here. Purely combinational; the mux numbering and
// the Seq meanings are as specified for the sequencer.
module address_select
  import mips_mc_pkg::*;
(
  input  logic [3:0] plus1,
  input  seq_t       seq,
  input  logic [5:0] op,
  output logic [3:0] next_addr
);

  logic [3:0] disp1, disp2;

  dispatch1_rom u_dispatch1 (.op(op), .addr(disp1));
  dispatch2_rom u_dispatch2 (.op(op), .addr(disp2));

  always_comb begin
    unique case (seq)
      SEQ_NEXT:      next_addr = plus1;
      SEQ_FETCH:     next_addr = 4'h0;
      SEQ_DISPATCH1: next_addr = disp1;
      SEQ_DISPATCH2: next_addr = disp2;
    endcase
  end

endmodule
