// ucode_table.svh: the microcode table written out column by column, for the
// testbenches. Each string lists, left to right, ALUOp[1:0], ALUSrcA,
// ALUSrcB[1:0], RegWrite, RegDst, MemtoReg, IorD, MemRead, MemWrite, IRWrite,
// PCSource[1:0], PCWrite, PCWriteCond, Seq[1:0]; 'x' marks a don't-care.
// ucode_match() compares an 18-bit word against one row, most significant
// bit first, ignoring the don't-cares and the bits that mask leaves 0.
`ifndef UCODE_TABLE_SVH
`define UCODE_TABLE_SVH
string UCODE_ROWS [12] = '{
  "00 0 01 0 x x 0 1 0 1 00 1 0 00",   // 0
  "00 0 11 0 x x x 0 0 0 xx 0 0 10",   // 1
  "00 1 10 0 x x x 0 0 0 xx 0 0 11",   // 2
  "xx x xx 0 x x 1 1 0 0 xx 0 0 00",   // 3
  "xx x xx 1 0 1 x 0 0 0 xx 0 0 01",   // 4
  "xx x xx 0 x x 1 0 1 0 xx 0 0 01",   // 5
  "10 1 00 0 x x x 0 0 0 xx 0 0 00",   // 6
  "xx x xx 1 1 0 x 0 0 0 xx 0 0 01",   // 7
  "01 1 00 0 x x x 0 0 0 01 0 1 01",   // 8
  "xx x xx 0 x x x 0 0 0 10 1 0 01",   // 9
  "00 1 10 0 x x x 0 0 0 xx 0 0 00",   // A
  "xx x xx 1 0 0 x 0 0 0 xx 0 0 01"    // B
};

function automatic bit ucode_match(logic [17:0] w, int row, logic [17:0] mask = '1);
  int b = 17;
  string s = UCODE_ROWS[row];
  for (int i = 0; i < s.len(); i++) begin
    if (s[i] == " ") continue;
    if (mask[b] && s[i] == "0" && w[b] !== 1'b0) return 0;
    if (mask[b] && s[i] == "1" && w[b] !== 1'b1) return 0;
    b--;
  end
  return b == -1;
endfunction
`endif
