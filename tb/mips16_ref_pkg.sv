// mips16_ref_pkg: instruction-level reference model of the 16-bit MIPS, for
// the testbenches only.
//
// ref_cpu executes one instruction per call of step() on its own copy of the
// architectural state (PC, eight registers, 256-word data memory) and
// returns what the single-cycle data path must show during that instruction:
// the operands, immediate, ALU result, memory read data, write-back value,
// control signals and the next PC. It decodes instructions with plain
// numbers, independently of the RTL's package. PROG_HEX is the built-in
// program, hand-encoded.
package mips16_ref_pkg;

  localparam int PROG_LEN = 32;
  localparam logic [15:0] PROG_HEX [PROG_LEN] = '{
    16'h2085, 16'h217D, 16'h0530, 16'h0541, 16'h00DA, 16'h016B, 16'h017F, 16'h0554,
    16'h0565, 16'h0576, 16'hA9FF, 16'hC240, 16'h7083, 16'h717F, 16'h5283, 16'h537F,
    16'h9482, 16'h2381, 16'h2382, 16'h9505, 16'h2383, 16'h2300, 16'h3B01, 16'h9B81,
    16'h807D, 16'hE01B, 16'h2309, 16'h6300, 16'h2007, 16'h4080, 16'h0420, 16'hE01F
  };

  typedef struct {
    logic [15:0] instr, pc, pc_plus1, rd1, rd2, ext_imm, alu_res, mem_data, wd;
    logic [15:0] next_pc, branch_addr, jump_addr;
    logic [7:0]  ctrl_bits;   // {RegDst,ExtOp,ALUSrc,Branch,Jump,MemWrite,MemtoReg,RegWrite}
    logic [2:0]  alu_op;
    logic [2:0]  wa;
    bit          reg_we, mem_we, is_branch, taken, is_jump;
    int          alu_fn;      // 0..7: add sub sll srl and or xor sra
  } exp_t;

  class ref_cpu;
    logic [15:0] regs [8];
    logic [15:0] mem  [256];
    logic [15:0] rom  [256];
    logic [15:0] pc;

    function new();
      for (int i = 0; i < 256; i++) begin
        rom[i] = (i < PROG_LEN) ? PROG_HEX[i] : 16'h0000;
        mem[i] = 16'h0000;
      end
      reset();
    endfunction

    function void reset();
      pc = 0;
      for (int i = 0; i < 8; i++) regs[i] = 0;
    endfunction

    function exp_t step();
      exp_t e;
      int op, rs, rt, rd, sa, fn;
      logic [15:0] a, b;
      e.instr = rom[pc[7:0]];
      e.pc = pc;
      op = int'(e.instr[15:13]); rs = int'(e.instr[12:10]); rt = int'(e.instr[9:7]);
      rd = int'(e.instr[6:4]);   sa = int'(e.instr[3]);     fn = int'(e.instr[2:0]);
      e.pc_plus1 = pc + 16'd1;
      e.rd1 = regs[rs];
      e.rd2 = regs[rt];
      case (op)
        0: begin e.ctrl_bits = 8'h81; e.alu_op = 0; e.alu_fn = fn; end
        1: begin e.ctrl_bits = 8'h61; e.alu_op = 1; e.alu_fn = 0;  end
        2: begin e.ctrl_bits = 8'h63; e.alu_op = 1; e.alu_fn = 0;  end
        3: begin e.ctrl_bits = 8'h64; e.alu_op = 1; e.alu_fn = 0;  end
        4: begin e.ctrl_bits = 8'h50; e.alu_op = 2; e.alu_fn = 1;  end
        5: begin e.ctrl_bits = 8'h21; e.alu_op = 3; e.alu_fn = 4;  end
        6: begin e.ctrl_bits = 8'h21; e.alu_op = 4; e.alu_fn = 5;  end
        default: begin e.ctrl_bits = 8'h08; e.alu_op = 1; e.alu_fn = 0; end
      endcase
      // sign extension for addi, lw, sw, beq; zero extension otherwise
      if (op >= 1 && op <= 4) e.ext_imm = 16'($signed(e.instr[6:0]));
      else                    e.ext_imm = {9'd0, e.instr[6:0]};
      a = e.rd1;
      b = e.ctrl_bits[5] ? e.ext_imm : e.rd2;
      case (e.alu_fn)
        0: e.alu_res = a + b;
        1: e.alu_res = a + (~b) + 16'd1;
        2: e.alu_res = (sa != 0) ? {b[14:0], 1'b0} : b;
        3: e.alu_res = (sa != 0) ? {1'b0, b[15:1]} : b;
        4: e.alu_res = a & b;
        5: e.alu_res = a | b;
        6: e.alu_res = a ^ b;
        default: e.alu_res = (sa != 0) ? {b[15], b[15:1]} : b;
      endcase
      e.mem_data  = mem[e.alu_res[7:0]];
      e.wd        = e.ctrl_bits[1] ? e.mem_data : e.alu_res;
      e.wa        = e.ctrl_bits[7] ? 3'(rd) : 3'(rt);
      e.reg_we    = e.ctrl_bits[0];
      e.mem_we    = e.ctrl_bits[2];
      e.is_branch = (op == 4);
      e.is_jump   = (op == 7);
      e.taken     = e.is_branch && (e.alu_res == 0);
      e.branch_addr = e.pc_plus1 + e.ext_imm;
      e.jump_addr   = {e.pc_plus1[15:13], e.instr[12:0]};
      if (e.is_jump)    e.next_pc = e.jump_addr;
      else if (e.taken) e.next_pc = e.branch_addr;
      else              e.next_pc = e.pc_plus1;
      // commit
      if (e.reg_we && e.wa != 0) regs[e.wa] = e.wd;
      if (e.mem_we) mem[e.alu_res[7:0]] = e.rd2;
      pc = e.next_pc;
      return e;
    endfunction
  endclass

endpackage
