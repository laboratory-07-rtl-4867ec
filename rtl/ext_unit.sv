// ext_unit: extends the 7-bit immediate field of an I-type instruction to 16
// bits. ExtOp = 1 copies bit 6 into the upper bits (sign extension, for
// addi, lw, sw and beq); ExtOp = 0 fills them with zeros (for andi, ori).
// Purely combinational. Which instructions use which extension is this
// design's own choice.
module ext_unit
  import mips16_pkg::*;
(
  input  logic             ext_op,
  input  logic [IMM_W-1:0] imm,
  output word_t            ext_imm
);
  assign ext_imm = {{(WORD_W-IMM_W){ext_op & imm[IMM_W-1]}}, imm};
endmodule
