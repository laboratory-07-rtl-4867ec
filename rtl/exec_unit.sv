// exec_unit: the EX unit - ALU, ALU control, ALUSrc multiplexer and the
// branch-target adder.
//
// The ALU's first operand is RD1; its second is RD2 when ALUSrc = 0 and the
// extended immediate when ALUSrc = 1. ALU control derives ALUCtrl from ALUOp
// and the function field. The branch target is PC+1 + Ext_Imm: with word
// addressing the offset needs no shift, unlike the 32-bit version's
// PC+4 + (Ext_Imm << 2). Outputs are ALURes, Zero and the branch address,
// all combinational. Structure as in the reference EX data path.
module exec_unit
  import mips16_pkg::*;
(
  input  word_t      pc_plus1,
  input  word_t      rd1,
  input  word_t      rd2,
  input  word_t      ext_imm,
  input  logic [2:0] func,
  input  logic       sa,
  input  logic       alu_src,
  input  alu_op_e    alu_op,
  output word_t      branch_addr,
  output word_t      alu_res,
  output logic       zero,
  output alu_ctrl_e  alu_ctrl
);
  word_t alu_b;

  assign branch_addr = pc_plus1 + ext_imm;
  assign alu_b       = alu_src ? ext_imm : rd2;

  alu_control u_aluctl (
    .alu_op  (alu_op),
    .func    (func),
    .alu_ctrl(alu_ctrl)
  );

  alu u_alu (
    .a       (rd1),
    .b       (alu_b),
    .sa      (sa),
    .alu_ctrl(alu_ctrl),
    .res     (alu_res),
    .zero    (zero)
  );
endmodule
