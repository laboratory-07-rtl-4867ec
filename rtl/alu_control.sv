// alu_control: turns ALUOp from the main control unit, and for R-type
// instructions the 3-bit function field, into the ALUCtrl code of the ALU.
// For I-type instructions ALUCtrl depends on ALUOp alone; for R-type
// (ALUOp = RTYPE) it is the function field, because the function codes of
// this design's instruction set are the ALUCtrl codes. Combinational.
module alu_control
  import mips16_pkg::*;
(
  input  alu_op_e    alu_op,
  input  logic [2:0] func,
  output alu_ctrl_e  alu_ctrl
);
  always_comb begin
    case (alu_op)
      ALUOP_RTYPE: alu_ctrl = alu_ctrl_e'(func);
      ALUOP_ADD:   alu_ctrl = ALU_ADD;
      ALUOP_SUB:   alu_ctrl = ALU_SUB;
      ALUOP_AND:   alu_ctrl = ALU_AND;
      ALUOP_OR:    alu_ctrl = ALU_OR;
      default:     alu_ctrl = ALU_ADD;
    endcase
  end
endmodule
