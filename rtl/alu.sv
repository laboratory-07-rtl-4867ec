// alu: 16-bit arithmetic-logic unit of the EX unit.
//
// Computes `res` from the operands `a` (Read Data 1) and `b` (Read Data 2 or
// the extended immediate) as selected by ALUCtrl: add, sub, and, or, xor, and
// three shifts of `b` by the 1-bit shift amount `sa` (logical left, logical
// right, arithmetic right). `zero` is 1 when the result is 0 and 0 otherwise;
// beq uses it after a subtraction. Purely combinational; overflow and carry
// are not produced. The Zero flag and the 1-bit shift amount used only by
// the shifts follow the reference design; the set of operations and the choice of
// `b` as the shifted operand (as MIPS sll/srl/sra shift rt) are this design's.
module alu
  import mips16_pkg::*;
(
  input  word_t     a,
  input  word_t     b,
  input  logic      sa,
  input  alu_ctrl_e alu_ctrl,
  output word_t     res,
  output logic      zero
);
  always_comb begin
    unique case (alu_ctrl)
      ALU_ADD: res = a + b;
      ALU_SUB: res = a - b;
      ALU_SLL: res = b << sa;
      ALU_SRL: res = b >> sa;
      ALU_AND: res = a & b;
      ALU_OR:  res = a | b;
      ALU_XOR: res = a ^ b;
      ALU_SRA: res = word_t'($signed(b) >>> sa);
      default: res = '0;
    endcase
  end

  assign zero = (res == '0);
endmodule
