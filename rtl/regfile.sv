// regfile: the processor's register file, NREGS x 32 bits.
//
// Two combinational read ports (ra1/rd1 for rs, ra2/rd2 for rt) and one
// write port written on the rising clock edge when we is high. Register 0
// always reads 0, as MIPS requires. The array has no reset; software writes a
// register before reading it. The register count is the MIPS one and the
// port timing is this design's choice.
module regfile #(
  parameter int unsigned NREGS = 32
) (
  input  logic        clk,
  input  logic        we,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  input  logic [4:0]  wa,
  input  logic [31:0] wd,
  output logic [31:0] rd1,
  output logic [31:0] rd2
);

  logic [31:0] rf [NREGS];

  always_ff @(posedge clk) begin
    if (we && wa != 5'd0) rf[wa] <= wd;
  end

  assign rd1 = (ra1 == 5'd0) ? 32'b0 : rf[ra1];
  assign rd2 = (ra2 == 5'd0) ? 32'b0 : rf[ra2];

endmodule
