// tb_eunit: random instructions, memory data and control settings applied to
// the execution unit, compared each cycle with a model of its registers:
// register file writes (rt or rd, ALUOut or MemoryData), the A and B
// registers, the SrcA/SrcB muxes, the ALU result and zero flag, ALUOut and
// WriteData. The ALU reference uses the five operations of the processor.
`timescale 1ns/1ps
module tb_eunit;
  logic Clk = 0, Reset = 1;
  logic [31:0] Instruction, MemoryData, PC;
  logic RegDst, MemtoReg, RegWrite, ALUSrcA;
  logic [1:0] ALUSrcB;
  logic [2:0] ALUControl;
  logic Zero;
  logic [31:0] ALUResult, ALUOut, WriteData, SrcA, SrcB;

  logic [31:0] rf [32];
  logic [31:0] a_m, b_m, out_m, sa, sb, y, imm;
  logic [4:0]  wa;
  int checks = 0, failures = 0;
  int zeros = 0;

  eunit dut (.*);

  always #5 Clk = ~Clk;

  logic [2:0] ops [5] = '{3'b010, 3'b110, 3'b000, 3'b001, 3'b111};

  function automatic logic [31:0] alu_ref(logic [31:0] x, logic [31:0] w, logic [2:0] c);
    case (c)
      3'b000: return x & w;
      3'b001: return x | w;
      3'b010: return x + w;
      3'b110: return x - w;
      default: return {31'b0, $signed(x - w) < 0};
    endcase
  endfunction

  initial begin
    #1000000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    Instruction = 0; MemoryData = 0; PC = 0; RegDst = 0; MemtoReg = 0; RegWrite = 0;
    ALUSrcA = 0; ALUSrcB = 0; ALUControl = 3'b010;
    @(posedge Clk);
    @(negedge Clk) Reset = 0;
    a_m = 0; b_m = 0; out_m = 0;
    // Write every register with a known value first (through MemoryData).
    rf[0] = 0;
    for (int i = 1; i < 32; i++) begin
      Instruction = {6'h23, 5'd0, 5'(i), 16'h0}; RegDst = 0; MemtoReg = 1; RegWrite = 1;
      MemoryData = (i % 3 == 0) ? 32'(i) : $urandom; rf[i] = MemoryData;
      @(negedge Clk);
    end
    // One idle cycle so that A and B hold known registers (rs = 0, rt = 31).
    RegWrite = 0; Instruction = {6'h0, 5'd0, 5'd31, 16'h0};
    ALUSrcA = 0; ALUSrcB = 2'b01; ALUControl = 3'b010; PC = 32'h100;
    @(negedge Clk);
    a_m = rf[0]; b_m = rf[31];
    out_m = 32'h104;               // PC + 4 of the idle cycle
    for (int n = 0; n < 3000; n++) begin
      Instruction = $urandom; MemoryData = $urandom; PC = $urandom;
      RegDst = $urandom_range(0, 1); MemtoReg = $urandom_range(0, 1);
      RegWrite = $urandom_range(0, 1); ALUSrcA = $urandom_range(0, 1);
      ALUSrcB = 2'($urandom); ALUControl = ops[$urandom_range(0, 4)];
      if (n % 7 == 0) begin  // force equal operands now and then
        ALUSrcA = 1; ALUSrcB = 0; ALUControl = 3'b110;
      end
      imm = {{16{Instruction[15]}}, Instruction[15:0]};
      sa = ALUSrcA ? a_m : PC;
      case (ALUSrcB)
        2'b00: sb = b_m;
        2'b01: sb = 4;
        2'b10: sb = imm;
        2'b11: sb = imm << 2;
      endcase
      y = alu_ref(sa, sb, ALUControl);
      #1 checks++;
      if (SrcA !== sa || SrcB !== sb || ALUResult !== y || Zero !== (y == 0) ||
          ALUOut !== out_m || WriteData !== b_m) begin
        failures++;
        $display("cycle %0d: srca %h/%h srcb %h/%h y %h/%h aluout %h/%h wd %h/%h",
                 n, SrcA, sa, SrcB, sb, ALUResult, y, ALUOut, out_m, WriteData, b_m);
      end
      if (y == 0) zeros++;
      @(posedge Clk);
      // A and B capture the register file as it was before this edge's write.
      a_m = (Instruction[25:21] == 0) ? 0 : rf[Instruction[25:21]];
      b_m = (Instruction[20:16] == 0) ? 0 : rf[Instruction[20:16]];
      wa = RegDst ? Instruction[15:11] : Instruction[20:16];
      if (RegWrite && wa != 0) rf[wa] = MemtoReg ? MemoryData : out_m;
      out_m = y;
      @(negedge Clk);
    end
    checks++;
    if (zeros == 0) begin failures++; $display("zero flag never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
