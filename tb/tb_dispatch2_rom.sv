// tb_dispatch2_rom: checks all 64 opcodes of the second dispatch table:
// lw (23h) -> 3, sw (2Bh) -> 5, all others 0.
`timescale 1ns/1ps
module tb_dispatch2_rom;
  logic [5:0] op;
  logic [3:0] addr, exp;
  int checks = 0, failures = 0;

  dispatch2_rom dut (.op(op), .addr(addr));

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      op = 6'(i);
      exp = (i == 'h23) ? 4'h3 : (i == 'h2B) ? 4'h5 : 4'h0;
      #1 checks++;
      if (addr !== exp) begin failures++; $display("op %h -> %h, expected %h", op, addr, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
