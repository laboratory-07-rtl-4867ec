// instr_decode: the ID / operand-fetch unit.
//
// Splits the instruction into its fields, reads rs and rt from the register
// file, picks the write address (rd when RegDst = 1, else rt) and extends the
// 7-bit immediate (ext_unit). The write data WD comes back from the
// write-back multiplexer and is written on the rising edge when `reg_write`
// is high; the caller gates RegWrite with the step enable. Reads are
// combinational. The structure follows the processor data path; the field
// positions follow the 16-bit instruction formats.
module instr_decode
  import mips16_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  word_t     instr,
  input  word_t     wd,
  input  logic      reg_write,
  input  logic      reg_dst,
  input  logic      ext_op,
  output word_t     rd1,
  output word_t     rd2,
  output word_t     ext_imm,
  output logic [2:0] func,
  output logic      sa,
  output reg_addr_t wa
);
  reg_addr_t rs, rt, rd;

  assign rs   = instr[12:10];
  assign rt   = instr[9:7];
  assign rd   = instr[6:4];
  assign sa   = instr[3];
  assign func = instr[2:0];
  assign wa   = reg_dst ? rd : rt;

  reg_file u_rf (
    .clk(clk), .rst(rst), .we(reg_write),
    .ra1(rs), .ra2(rt), .wa(wa), .wd(wd),
    .rd1(rd1), .rd2(rd2)
  );

  ext_unit u_ext (
    .ext_op (ext_op),
    .imm    (instr[IMM_W-1:0]),
    .ext_imm(ext_imm)
  );
endmodule
