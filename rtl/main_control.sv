// main_control: decodes the 3-bit opcode into the eight 1-bit control
// signals (RegDst, ExtOp, ALUSrc, Branch, Jump, MemWrite, MemtoReg, RegWrite)
// and the 3-bit ALUOp. Purely combinational. The signal names follow the
// processor data path; the table below belongs to this design's own
// instruction set (see mips16_pkg).
//
//   op    RegDst ExtOp ALUSrc Branch Jump MemWr MemtoReg RegWr ALUOp
//   R       1     0     0      0     0    0      0       1    RTYPE
//   addi    0     1     1      0     0    0      0       1    ADD
//   lw      0     1     1      0     0    0      1       1    ADD
//   sw      0     1     1      0     0    1      0       0    ADD
//   beq     0     1     0      1     0    0      0       0    SUB
//   andi    0     0     1      0     0    0      0       1    AND
//   ori     0     0     1      0     0    0      0       1    OR
//   j       0     0     0      0     1    0      0       0    ADD
module main_control
  import mips16_pkg::*;
(
  input  logic [2:0] opcode,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl        = '0;
    ctrl.alu_op = ALUOP_ADD;
    case (opcode)
      OP_RTYPE: begin
        ctrl.reg_dst   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.alu_op    = ALUOP_RTYPE;
      end
      OP_ADDI: begin
        ctrl.ext_op    = 1'b1;
        ctrl.alu_src   = 1'b1;
        ctrl.reg_write = 1'b1;
      end
      OP_LW: begin
        ctrl.ext_op     = 1'b1;
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
        ctrl.reg_write  = 1'b1;
      end
      OP_SW: begin
        ctrl.ext_op    = 1'b1;
        ctrl.alu_src   = 1'b1;
        ctrl.mem_write = 1'b1;
      end
      OP_BEQ: begin
        ctrl.ext_op = 1'b1;
        ctrl.branch = 1'b1;
        ctrl.alu_op = ALUOP_SUB;
      end
      OP_ANDI: begin
        ctrl.alu_src   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.alu_op    = ALUOP_AND;
      end
      OP_ORI: begin
        ctrl.alu_src   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.alu_op    = ALUOP_OR;
      end
      OP_J: begin
        ctrl.jump = 1'b1;
      end
      default: ;
    endcase
  end
endmodule
