// tb_microcode_rom: checks every word of the microcode storage against the
// microcode table (don't-cares skipped), the full State 0 word 02148, and
// that the unused words C-F are 0.
`timescale 1ns/1ps
module tb_microcode_rom;
  import mips_mc_pkg::*;
  `include "ucode_table.svh"

  logic [3:0] addr;
  microword_t uword;
  int checks = 0, failures = 0;

  microcode_rom dut (.addr(addr), .uword(uword));

  initial begin
    #100000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      addr = 4'(s);
      #1;
      checks++;
      if (s < 12) begin
        if (!ucode_match(uword, s)) begin
          failures++; $display("state %h: word %05h does not match the table", s, uword);
        end
      end else if (uword !== '0) begin
        failures++; $display("unused word %h = %05h", s, uword);
      end
    end
    addr = 4'h0; #1;
    checks++;
    if (uword !== 18'h02148) begin failures++; $display("state 0 word %05h", uword); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
