// write_back: the WB unit and the remaining next-PC logic.
//
// - Write-back multiplexer: WD = MemData when MemtoReg = 1, else ALURes.
// - PCSrc = Branch AND Zero: take the branch target when a beq finds its two
//   registers equal.
// - Jump address: the upper 3 bits of PC+1 followed by the 13-bit target
//   field, the 16-bit word-addressed form of the 32-bit
//   PC+4[31:28] || Instr[25:0] || 00 (no low zero bits are needed with word
//   addresses). All combinational.
module write_back
  import mips16_pkg::*;
(
  input  logic  mem_to_reg,
  input  word_t alu_res,
  input  word_t mem_data,
  input  logic  branch,
  input  logic  zero,
  input  word_t pc_plus1,
  input  logic [TGT_W-1:0] target,
  output word_t wd,
  output logic  pc_src,
  output word_t jump_addr
);
  assign wd        = mem_to_reg ? mem_data : alu_res;
  assign pc_src    = branch & zero;
  assign jump_addr = {pc_plus1[WORD_W-1:TGT_W], target};
endmodule
