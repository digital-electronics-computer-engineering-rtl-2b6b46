// tb_dispatch1_rom: checks all 64 opcodes of the first dispatch table:
// R-type -> 6, lw/sw -> 2, beq -> 8, j -> 9, addi -> A, all others 0.
`timescale 1ns/1ps
module tb_dispatch1_rom;
  logic [5:0] op;
  logic [3:0] addr, exp;
  int checks = 0, failures = 0;

  dispatch1_rom dut (.op(op), .addr(addr));

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      op = 6'(i);
      case (i)
        'h00: exp = 4'h6;
        'h23, 'h2B: exp = 4'h2;
        'h04: exp = 4'h8;
        'h02: exp = 4'h9;
        'h08: exp = 4'hA;
        default: exp = 4'h0;
      endcase
      #1 checks++;
      if (addr !== exp) begin failures++; $display("op %h -> %h, expected %h", op, addr, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
