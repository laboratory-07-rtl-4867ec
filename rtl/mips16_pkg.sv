// mips16_pkg: types and constants shared by the 16-bit single-cycle MIPS.
//
// All data paths are 16 bits wide. Instructions are 16 bits in three
// formats, all with a 3-bit opcode in [15:13]:
//   R-type: opcode | rs[12:10] | rt[9:7] | rd[6:4] | sa[3] | func[2:0]
//   I-type: opcode | rs[12:10] | rt[9:7] | imm[6:0]
//   J-type: opcode | target[12:0]
// The field layout follows the processor's definition. The instruction set
// itself (which 15 instructions, their opcodes and function codes, the
// ALUOp and ALUCtrl encodings) is this design's own choice:
//   opcode 000 R-type, func: add sub sll srl and or xor sra (000..111)
//   opcode 001 addi, 010 lw, 011 sw, 100 beq, 101 andi, 110 ori, 111 j
package mips16_pkg;

  localparam int unsigned WORD_W = 16;
  localparam int unsigned REG_AW = 3;     // 8 registers
  localparam int unsigned IMM_W  = 7;
  localparam int unsigned TGT_W  = 13;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [REG_AW-1:0] reg_addr_t;

  typedef enum logic [2:0] {
    OP_RTYPE = 3'b000,
    OP_ADDI  = 3'b001,
    OP_LW    = 3'b010,
    OP_SW    = 3'b011,
    OP_BEQ   = 3'b100,
    OP_ANDI  = 3'b101,
    OP_ORI   = 3'b110,
    OP_J     = 3'b111
  } opcode_e;

  // ALU operations. R-type function codes use the same values, so for an
  // R-type instruction ALUCtrl is the function field itself.
  typedef enum logic [2:0] {
    ALU_ADD = 3'b000,
    ALU_SUB = 3'b001,
    ALU_SLL = 3'b010,
    ALU_SRL = 3'b011,
    ALU_AND = 3'b100,
    ALU_OR  = 3'b101,
    ALU_XOR = 3'b110,
    ALU_SRA = 3'b111
  } alu_ctrl_e;

  // ALUOp from the main control unit.
  typedef enum logic [2:0] {
    ALUOP_RTYPE = 3'b000,   // use the function field
    ALUOP_ADD   = 3'b001,   // addi, lw, sw
    ALUOP_SUB   = 3'b010,   // beq
    ALUOP_AND   = 3'b011,   // andi
    ALUOP_OR    = 3'b100    // ori
  } alu_op_e;

  // The eight 1-bit control signals plus ALUOp.
  typedef struct packed {
    logic    reg_dst;    // 1: write rd, 0: write rt
    logic    ext_op;     // 1: sign-extend the immediate, 0: zero-extend
    logic    alu_src;    // 1: ALU B input is Ext_Imm, 0: RD2
    logic    branch;
    logic    jump;
    logic    mem_write;
    logic    mem_to_reg; // 1: write back MemData, 0: ALURes
    logic    reg_write;
    alu_op_e alu_op;
  } ctrl_t;

  // Instruction encoders, used by the built-in program and by testbenches.
  function automatic word_t enc_r(alu_ctrl_e f, int rs, int rt, int rd, int sa);
    return {OP_RTYPE, 3'(rs), 3'(rt), 3'(rd), 1'(sa), f};
  endfunction

  function automatic word_t enc_i(opcode_e op, int rs, int rt, int imm);
    return {op, 3'(rs), 3'(rt), 7'(imm)};
  endfunction

  function automatic word_t enc_j(int target);
    return {OP_J, 13'(target)};
  endfunction

endpackage
