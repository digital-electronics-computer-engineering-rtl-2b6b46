// shared_memory: the single memory that holds both instructions and data.
//
// WORDS x 32-bit RAM addressed by a byte address whose low two bits are
// ignored (word accesses only). Reading is combinational, so the
// instruction or memory data register can capture the word at the end of the
// same cycle; writing happens on the rising edge when we is high. The memory
// has no reset and no built-in contents: the program is loaded into it before
// reset is released. The size is this design's choice (64 words).
module shared_memory #(
  parameter int unsigned WORDS = 64
) (
  input  logic        clk,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wd,
  output logic [31:0] rd
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0] mem [WORDS];
  logic [AW-1:0] widx;

  assign widx = addr[AW+1:2];

  always_ff @(posedge clk) begin
    if (we) mem[widx] <= wd;
  end

  assign rd = mem[widx];

endmodule
