// alu: 32-bit ALU of the execution unit.
//
// f[2] selects B or ~B; with ~B the adder also gets a carry-in of 1, so
// the sum becomes A - B. f[1:0] then picks A & B', A | B', the sum, or
// set-less-than (the sign bit of A - B, zero-extended). zero is high when the
// result is 0, which beq uses. Combinational. Only the ALU's role and its
// Zero output are specified; this structure is this design's choice.
module alu (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [2:0]  f,
  output logic [31:0] y,
  output logic        zero
);

  logic [31:0] bb, sum;

  assign bb  = f[2] ? ~b : b;
  assign sum = a + bb + {31'b0, f[2]};

  always_comb begin
    unique case (f[1:0])
      2'b00: y = a & bb;
      2'b01: y = a | bb;
      2'b10: y = sum;
      2'b11: y = {31'b0, sum[31]};
    endcase
  end

  assign zero = (y == 32'b0);

endmodule
