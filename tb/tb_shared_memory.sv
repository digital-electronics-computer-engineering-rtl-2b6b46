// tb_shared_memory: random word writes and combinational reads against a
// model; the low two address bits must be ignored.
`timescale 1ns/1ps
module tb_shared_memory;
  logic clk = 0, we;
  logic [31:0] addr, wd, rd;
  logic [31:0] model [64];
  int checks = 0, failures = 0;

  shared_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      we = 1; addr = 32'(i * 4); wd = $urandom; model[i] = wd;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); addr = {24'b0, 8'($urandom)}; wd = $urandom;
      #1 checks++;
      if (rd !== model[addr[7:2]]) begin
        failures++; $display("read %h: %h, expected %h", addr, rd, model[addr[7:2]]);
      end
      @(posedge clk);
      if (we) model[addr[7:2]] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
