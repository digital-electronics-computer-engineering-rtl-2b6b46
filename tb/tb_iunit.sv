// tb_iunit: random PCSource/PCEnable/operand sequences against a model of the
// PC register: 00 ALUResult, 01 ALUOut, 10 {PC[31:28], Instruction[25:0], 00},
// 11 ALUResult; loads only with PCEnable; asynchronous reset to 0.
`timescale 1ns/1ps
module tb_iunit;
  logic Clk = 0, Reset = 1, PCEnable;
  logic [1:0] PCSource;
  logic [31:0] Instruction, ALUResult, ALUOut, PC, model;
  int checks = 0, failures = 0;

  iunit dut (.*);

  always #5 Clk = ~Clk;

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    PCEnable = 1; PCSource = 0; ALUResult = 32'h1234; ALUOut = 0; Instruction = 0;
    @(posedge Clk); #1 checks++;
    if (PC !== 0) begin failures++; $display("PC not held at 0 in reset"); end
    @(negedge Clk) Reset = 0;
    model = 0;
    for (int n = 0; n < 2000; n++) begin
      PCEnable = $urandom_range(0, 1); PCSource = 2'($urandom);
      Instruction = $urandom; ALUResult = $urandom; ALUOut = $urandom;
      @(posedge Clk);
      if (PCEnable)
        case (PCSource)
          2'b01:   model = ALUOut;
          2'b10:   model = {model[31:28], Instruction[25:0], 2'b00};
          default: model = ALUResult;
        endcase
      @(negedge Clk) checks++;
      if (PC !== model) begin failures++; $display("cycle %0d: PC %h expected %h", n, PC, model); end
    end
    #2 Reset = 1; #1 checks++;
    if (PC !== 0) begin failures++; $display("asynchronous reset failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
