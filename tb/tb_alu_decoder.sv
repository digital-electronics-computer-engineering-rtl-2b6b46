// tb_alu_decoder: exhaustive check of ALUControl for all ALUOp and Funct[3:0]
// values: 00 add (010), 01 sub (110), 1x by funct (add 010, sub 110,
// and 000, or 001, slt 111, anything else 010).
`timescale 1ns/1ps
module tb_alu_decoder;
  logic [1:0] alu_op;
  logic [3:0] funct;
  logic [2:0] alu_control, exp;
  int checks = 0, failures = 0;

  alu_decoder dut (.alu_op(alu_op), .funct(funct), .alu_control(alu_control));

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 4; o++)
      for (int f = 0; f < 16; f++) begin
        alu_op = 2'(o); funct = 4'(f);
        if (o == 0) exp = 3'b010;
        else if (o == 1) exp = 3'b110;
        else case (f)
          4'b0000: exp = 3'b010;
          4'b0010: exp = 3'b110;
          4'b0100: exp = 3'b000;
          4'b0101: exp = 3'b001;
          4'b1010: exp = 3'b111;
          default: exp = 3'b010;
        endcase
        #1 checks++;
        if (alu_control !== exp) begin
          failures++; $display("aluop %b funct %b -> %b, expected %b", alu_op, funct, alu_control, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
