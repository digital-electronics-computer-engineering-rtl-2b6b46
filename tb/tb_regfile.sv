// tb_regfile: random writes and reads of the register file against a model
// array; register 0 must always read 0 even after a write to it. Writes
// take effect at the clock edge, reads are combinational.
`timescale 1ns/1ps
module tb_regfile;
  logic clk = 0, we;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] wd, rd1, rd2;
  logic [31:0] model [32];
  bit valid [32];
  int checks = 0, failures = 0;

  regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (valid[i]) valid[i] = (i == 0);
    model[0] = 0;
    for (int i = 0; i < 32; i++) begin      // fill every register once
      @(negedge clk);
      we = 1; wa = 5'(i); wd = $urandom;
      if (i != 0) begin model[i] = wd; valid[i] = 1; end
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); wa = 5'($urandom); wd = $urandom;
      ra1 = 5'($urandom); ra2 = (n % 5 == 0) ? 5'd0 : 5'($urandom);
      #1 checks++;
      if (rd1 !== model[ra1] || rd2 !== model[ra2]) begin
        failures++; $display("read %0d/%0d: %h %h, expected %h %h", ra1, ra2, rd1, rd2, model[ra1], model[ra2]);
      end
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
