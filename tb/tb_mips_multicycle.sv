// tb_mips_multicycle: end-to-end test of the multicycle MIPS processor.
//
// Loads the nine-instruction test program (tb/lab10_program.hex) at address 0
// and runs it with the processor at its default parameters:
//   00 addi $t0,$0,0x42      14 sw  $t3,0x2C($0)
//   04 j    later            18 lw  $t4,0x28($t1)
//   08 addi $t1,$0,4         1C done: j done
//   0C sub  $t2,$t0,$t1      20 later: beq $0,$0,earlier
//   10 or   $t3,$t2,$t0
// Every cycle from reset to the second pass through the done loop is compared
// with an expected trace worked out by hand (state, PC, instruction register,
// SrcA, SrcB, ALUResult, Zero; ALU columns are skipped where the state does
// not use the ALU). Afterwards the registers and the stored word are checked:
// $t4 must hold 0x7E. The test also counts how often each microcode state,
// each dispatch table, the taken branch and the memory write happened, and
// fails if any never did.
`timescale 1ns/1ps
module tb_mips_multicycle;

  logic        Clk = 1'b0;
  logic        Reset = 1'b1;
  logic [31:0] PC, Instruction, ALUResult, ALUOut, WriteData;
  logic [3:0]  State;
  logic        Zero, MemWrite;

  int checks = 0, failures = 0;

  mips_multicycle dut (.*);

  always #5 Clk = ~Clk;

  // Watchdog.
  initial begin
    repeat (400) @(posedge Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [3:0]  st;
    logic [31:0] pc, ir;
    bit          alu;   // ALU columns are checked
    logic [31:0] srca, srcb, res;
    logic        z;
  } row_t;

  function automatic row_t R(logic [3:0] st, logic [31:0] pc, logic [31:0] ir, bit alu,
                             logic [31:0] a = 0, logic [31:0] b = 0, logic [31:0] y = 0, logic z = 0);
    R = '{st, pc, ir, alu, a, b, y, z};
  endfunction

  row_t trace [1:37];
  initial begin
    trace[1]  = R(4'h0, 32'h00, 32'h00000000, 1, 32'h00, 32'h04, 32'h04, 0);
    trace[2]  = R(4'h1, 32'h04, 32'h20080042, 1, 32'h04, 32'h108, 32'h10C, 0);
    trace[3]  = R(4'hA, 32'h04, 32'h20080042, 1, 32'h00, 32'h42, 32'h42, 0);
    trace[4]  = R(4'hB, 32'h04, 32'h20080042, 0);
    trace[5]  = R(4'h0, 32'h04, 32'h20080042, 1, 32'h04, 32'h04, 32'h08, 0);
    trace[6]  = R(4'h1, 32'h08, 32'h08000008, 1, 32'h08, 32'h20, 32'h28, 0);
    trace[7]  = R(4'h9, 32'h08, 32'h08000008, 0);
    trace[8]  = R(4'h0, 32'h20, 32'h08000008, 1, 32'h20, 32'h04, 32'h24, 0);
    trace[9]  = R(4'h1, 32'h24, 32'h1000fff9, 1, 32'h24, 32'hFFFFFFE4, 32'h08, 0);
    trace[10] = R(4'h8, 32'h24, 32'h1000fff9, 1, 32'h00, 32'h00, 32'h00, 1);
    trace[11] = R(4'h0, 32'h08, 32'h1000fff9, 1, 32'h08, 32'h04, 32'h0C, 0);
    trace[12] = R(4'h1, 32'h0C, 32'h20090004, 1, 32'h0C, 32'h10, 32'h1C, 0);
    trace[13] = R(4'hA, 32'h0C, 32'h20090004, 1, 32'h00, 32'h04, 32'h04, 0);
    trace[14] = R(4'hB, 32'h0C, 32'h20090004, 0);
    trace[15] = R(4'h0, 32'h0C, 32'h20090004, 1, 32'h0C, 32'h04, 32'h10, 0);
    trace[16] = R(4'h1, 32'h10, 32'h01095022, 1, 32'h10, 32'h14088, 32'h14098, 0);
    trace[17] = R(4'h6, 32'h10, 32'h01095022, 1, 32'h42, 32'h04, 32'h3E, 0);
    trace[18] = R(4'h7, 32'h10, 32'h01095022, 0);
    trace[19] = R(4'h0, 32'h10, 32'h01095022, 1, 32'h10, 32'h04, 32'h14, 0);
    trace[20] = R(4'h1, 32'h14, 32'h01485825, 1, 32'h14, 32'h16094, 32'h160A8, 0);
    trace[21] = R(4'h6, 32'h14, 32'h01485825, 1, 32'h3E, 32'h42, 32'h7E, 0);
    trace[22] = R(4'h7, 32'h14, 32'h01485825, 0);
    trace[23] = R(4'h0, 32'h14, 32'h01485825, 1, 32'h14, 32'h04, 32'h18, 0);
    trace[24] = R(4'h1, 32'h18, 32'hac0b002c, 1, 32'h18, 32'hB0, 32'hC8, 0);
    trace[25] = R(4'h2, 32'h18, 32'hac0b002c, 1, 32'h00, 32'h2C, 32'h2C, 0);
    trace[26] = R(4'h5, 32'h18, 32'hac0b002c, 0);
    trace[27] = R(4'h0, 32'h18, 32'hac0b002c, 1, 32'h18, 32'h04, 32'h1C, 0);
    trace[28] = R(4'h1, 32'h1C, 32'h8d2c0028, 1, 32'h1C, 32'hA0, 32'hBC, 0);
    trace[29] = R(4'h2, 32'h1C, 32'h8d2c0028, 1, 32'h04, 32'h28, 32'h2C, 0);
    trace[30] = R(4'h3, 32'h1C, 32'h8d2c0028, 0);
    trace[31] = R(4'h4, 32'h1C, 32'h8d2c0028, 0);
    trace[32] = R(4'h0, 32'h1C, 32'h8d2c0028, 1, 32'h1C, 32'h04, 32'h20, 0);
    trace[33] = R(4'h1, 32'h20, 32'h08000007, 1, 32'h20, 32'h1C, 32'h3C, 0);
    trace[34] = R(4'h9, 32'h20, 32'h08000007, 0);
    trace[35] = R(4'h0, 32'h1C, 32'h08000007, 1, 32'h1C, 32'h04, 32'h20, 0);
    trace[36] = R(4'h1, 32'h20, 32'h08000007, 1, 32'h20, 32'h1C, 32'h3C, 0);
    trace[37] = R(4'h9, 32'h20, 32'h08000007, 0);
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp, int row);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("row %0d: %s = %h, expected %h", row, what, got, exp);
    end
  endtask

  // Event counters for the mechanisms of the design.
  int state_seen [16];
  int n_disp1 = 0, n_disp2 = 0, n_branch_taken = 0, n_mem_write = 0, n_jump = 0;

  always @(negedge Clk) begin
    if (!Reset) begin
      state_seen[State]++;
      if (State == 4'h1) n_disp1++;
      if (State == 4'h2) n_disp2++;
      if (State == 4'h8 && dut.PCEnable) n_branch_taken++;
      if (State == 4'h9 && dut.PCEnable) n_jump++;
      if (MemWrite) n_mem_write++;
    end
  end

  initial begin
    for (int i = 0; i < 64; i++) dut.u_munit.u_mem.mem[i] = 32'h0;
    $readmemh("tb/lab10_program.hex", dut.u_munit.u_mem.mem);
    foreach (state_seen[i]) state_seen[i] = 0;

    @(posedge Clk);          // row 0: in reset
    for (int r = 1; r <= 37; r++) begin
      @(negedge Clk);
      if (r == 1) Reset = 1'b0;  // released before the edge that ends row 1
      check("State",       {28'b0, State}, {28'b0, trace[r].st}, r);
      check("PC",          PC,             trace[r].pc, r);
      check("Instruction", Instruction,    trace[r].ir, r);
      if (trace[r].alu) begin
        check("SrcA",      dut.u_eunit.SrcA, trace[r].srca, r);
        check("SrcB",      dut.u_eunit.SrcB, trace[r].srcb, r);
        check("ALUResult", ALUResult,        trace[r].res,  r);
        check("Zero",      {31'b0, Zero},    {31'b0, trace[r].z}, r);
      end
    end

    // Stays in the done loop.
    repeat (12) begin
      @(negedge Clk);
      checks++;
      if (!(PC == 32'h1C || PC == 32'h20)) begin
        failures++;
        $display("left the done loop: PC=%h", PC);
      end
    end

    // Architectural results.
    check("$t0", dut.u_eunit.u_rf.rf[8],  32'h42, 0);
    check("$t1", dut.u_eunit.u_rf.rf[9],  32'h04, 0);
    check("$t2", dut.u_eunit.u_rf.rf[10], 32'h3E, 0);
    check("$t3", dut.u_eunit.u_rf.rf[11], 32'h7E, 0);
    check("$t4", dut.u_eunit.u_rf.rf[12], 32'h7E, 0);
    check("mem[0x2C]", dut.u_munit.u_mem.mem[11], 32'h7E, 0);

    // Every mechanism must have happened.
    for (int s = 0; s < 12; s++) begin
      checks++;
      if (state_seen[s] == 0) begin failures++; $display("state %h never visited", s); end
      else $display("state %h visited %0d times", s, state_seen[s]);
    end
    checks++; if (n_disp1 == 0)        begin failures++; $display("dispatch 1 never used"); end
    checks++; if (n_disp2 == 0)        begin failures++; $display("dispatch 2 never used"); end
    checks++; if (n_branch_taken == 0) begin failures++; $display("branch never taken"); end
    checks++; if (n_jump == 0)         begin failures++; $display("jump never taken"); end
    checks++; if (n_mem_write == 0)    begin failures++; $display("memory never written"); end
    $display("dispatch1=%0d dispatch2=%0d branches taken=%0d jumps=%0d memory writes=%0d",
             n_disp1, n_disp2, n_branch_taken, n_jump, n_mem_write);
    $display("$t4 = %h", dut.u_eunit.u_rf.rf[12]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
