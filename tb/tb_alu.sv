// tb_alu: directed and random checks of the 32-bit ALU against a reference
// computed here: and, or, add, sub, signed slt, plus the two inverted-B codes
// (100, 101), and the zero flag. Includes overflow corners for slt.
`timescale 1ns/1ps
module tb_alu;
  logic [31:0] a, b, y;
  logic [2:0]  f;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .f(f), .y(y), .zero(zero));

  function automatic logic [31:0] ref_y(logic [31:0] x, logic [31:0] w, logic [2:0] c);
    case (c)
      3'b000: return x & w;
      3'b001: return x | w;
      3'b010: return x + w;
      3'b011: return {31'b0, (x + w) >> 31 != 0};
      3'b100: return x & ~w;
      3'b101: return x | ~w;
      3'b110: return x - w;
      3'b111: return {31'b0, (x - w) >> 31 != 0};
    endcase
  endfunction

  task automatic one(logic [31:0] x, logic [31:0] w, logic [2:0] c);
    logic [31:0] e;
    a = x; b = w; f = c;
    e = ref_y(x, w, c);
    #1 checks++;
    if (y !== e || zero !== (e == 0)) begin
      failures++; $display("f=%b a=%h b=%h: y=%h z=%b, expected %h", c, x, w, y, zero, e);
    end
  endtask

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    one(32'h42, 32'h4, 3'b110);          // 3E
    one(32'h3E, 32'h42, 3'b001);         // 7E
    one(32'h0, 32'h0, 3'b110);           // zero
    one(32'h5, 32'h7, 3'b111);           // 1
    one(32'h7, 32'h5, 3'b111);           // 0
    one(32'hFFFFFFFF, 32'h1, 3'b111);    // -1 < 1
    one(32'hF0F0F0F0, 32'h0FF00FF0, 3'b000);
    one(32'h24, 32'hFFFFFFE4, 3'b010);   // 08
    for (int i = 0; i < 2000; i++) begin
      logic [2:0] c;
      c = 3'($urandom);
      if (c == 3'b011) c = 3'b111;       // 011 is not a defined operation
      one($urandom, (i % 4 == 0) ? 32'($urandom_range(0, 3)) : $urandom, c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
