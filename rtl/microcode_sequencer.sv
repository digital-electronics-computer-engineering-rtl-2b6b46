// microcode_sequencer: the microprogrammed state machine of the control unit.
//
// A 4-bit microprogram counter addresses the microcode storage. The word read
// out drives the datapath controls; its Seq field, together with the opcode,
// picks the next address through address_select from state + 1 (a 4-bit
// adder), 0, or one of the two dispatch tables. The counter loads the next
// address on every rising clock edge and is cleared to 0 (fetch) by an
// asynchronous, active-high reset, mirroring the resettable register of the
// specification. uword and state are valid combinationally during the state.
module microcode_sequencer
  import mips_mc_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic [5:0] op,
  output microword_t uword,
  output logic [3:0] state
);

  logic [3:0] plus1, next_addr;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) state <= 4'h0;
    else       state <= next_addr;
  end

  assign plus1 = state + 4'd1;

  microcode_rom  u_rom (.addr(state), .uword(uword));

  address_select u_asel (
    .plus1    (plus1),
    .seq      (uword.seq),
    .op       (op),
    .next_addr(next_addr)
  );

endmodule
