// tb_address_select: drives every Seq code with random Plus1 values and the
// opcodes of the supported instructions (plus random ones) and checks the
// next microprogram address: Plus1, 0, Dispatch1[Op] or Dispatch2[Op].
`timescale 1ns/1ps
module tb_address_select;
  import mips_mc_pkg::*;
  logic [3:0] plus1, next_addr, exp;
  seq_t       seq;
  logic [5:0] op;
  int checks = 0, failures = 0;

  address_select dut (.plus1(plus1), .seq(seq), .op(op), .next_addr(next_addr));

  function automatic logic [3:0] d1(logic [5:0] o);
    case (o)
      6'h00: return 4'h6;  6'h23: return 4'h2;  6'h2B: return 4'h2;
      6'h04: return 4'h8;  6'h02: return 4'h9;  6'h08: return 4'hA;
      default: return 4'h0;
    endcase
  endfunction
  function automatic logic [3:0] d2(logic [5:0] o);
    return (o == 6'h23) ? 4'h3 : (o == 6'h2B) ? 4'h5 : 4'h0;
  endfunction

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [5:0] ops [8] = '{6'h00, 6'h02, 6'h04, 6'h08, 6'h23, 6'h2B, 6'h3F, 6'h11};
  initial begin
    for (int k = 0; k < 200; k++) begin
      plus1 = 4'($urandom);
      seq   = seq_t'(k % 4);
      op    = (k % 3 == 2) ? 6'($urandom) : ops[(k / 4) % 8];
      unique case (k % 4)
        0: exp = plus1;
        1: exp = 4'h0;
        2: exp = d1(op);
        3: exp = d2(op);
      endcase
      #1 checks++;
      if (next_addr !== exp) begin
        failures++; $display("seq %0d op %h plus1 %h -> %h, expected %h", k % 4, op, plus1, next_addr, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
