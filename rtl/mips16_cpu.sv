// mips16_cpu: the 16-bit single-cycle MIPS processor.
//
// Five units wired as in the classic single-cycle MIPS data path, every
// instruction completing in one clock cycle:
//   IF  (instr_fetch)  PC, instruction memory, PC+1, branch/jump selection
//   ID  (instr_decode) register file, RegDst multiplexer, immediate extension
//   CTRL(main_control) opcode -> eight 1-bit control signals and ALUOp
//   EX  (exec_unit)    ALU, ALU control, ALUSrc multiplexer, branch adder
//   MEM (mem_unit)     data memory
//   WB  (write_back)   MemtoReg multiplexer, PCSrc = Branch & Zero, jump address
// The results of WB feed back into ID (write data) and IF (next PC) within
// the same cycle.
//
// Timing: state changes only on a rising clock edge with `en` high. `en`
// gates the PC update, RegWrite and MemWrite alike, so that a one-cycle pulse
// (a debounced push button on the board) executes exactly one instruction;
// holding `en` high runs one instruction per clock. Validating RegWrite and
// MemWrite with the pulse follows the reference design; gating the PC with it too is
// this design's choice. `rst` (synchronous) clears PC and registers.
// The remaining outputs expose the data path for display and test.
module mips16_cpu
  import mips16_pkg::*;
#(
  parameter int unsigned IMEM_ADDR_W = 8,
  parameter int unsigned DMEM_ADDR_W = 8
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      en,
  output word_t     pc,
  output word_t     instr,
  output word_t     pc_plus1,
  output word_t     rd1,
  output word_t     rd2,
  output word_t     ext_imm,
  output word_t     alu_res,
  output word_t     mem_data,
  output word_t     wd,
  output word_t     branch_addr,
  output word_t     jump_addr,
  output logic      zero,
  output logic      pc_src,
  output alu_ctrl_e alu_ctrl,
  output reg_addr_t wa,
  output ctrl_t     ctrl
);
  logic [2:0] func;
  logic       sa;
  word_t      alu_res_wb;

  instr_fetch #(.IMEM_ADDR_W(IMEM_ADDR_W)) u_if (
    .clk        (clk),
    .rst        (rst),
    .en         (en),
    .jump       (ctrl.jump),
    .pc_src     (pc_src),
    .jump_addr  (jump_addr),
    .branch_addr(branch_addr),
    .pc         (pc),
    .pc_plus1   (pc_plus1),
    .instr      (instr)
  );

  main_control u_ctrl (
    .opcode(instr[15:13]),
    .ctrl  (ctrl)
  );

  instr_decode u_id (
    .clk      (clk),
    .rst      (rst),
    .instr    (instr),
    .wd       (wd),
    .reg_write(ctrl.reg_write & en),
    .reg_dst  (ctrl.reg_dst),
    .ext_op   (ctrl.ext_op),
    .rd1      (rd1),
    .rd2      (rd2),
    .ext_imm  (ext_imm),
    .func     (func),
    .sa       (sa),
    .wa       (wa)
  );

  exec_unit u_ex (
    .pc_plus1   (pc_plus1),
    .rd1        (rd1),
    .rd2        (rd2),
    .ext_imm    (ext_imm),
    .func       (func),
    .sa         (sa),
    .alu_src    (ctrl.alu_src),
    .alu_op     (ctrl.alu_op),
    .branch_addr(branch_addr),
    .alu_res    (alu_res),
    .zero       (zero),
    .alu_ctrl   (alu_ctrl)
  );

  mem_unit #(.ADDR_W(DMEM_ADDR_W)) u_mem (
    .clk        (clk),
    .mem_write  (ctrl.mem_write & en),
    .alu_res_in (alu_res),
    .rd2        (rd2),
    .mem_data   (mem_data),
    .alu_res_out(alu_res_wb)
  );

  write_back u_wb (
    .mem_to_reg(ctrl.mem_to_reg),
    .alu_res   (alu_res_wb),
    .mem_data  (mem_data),
    .branch    (ctrl.branch),
    .zero      (zero),
    .pc_plus1  (pc_plus1),
    .target    (instr[TGT_W-1:0]),
    .wd        (wd),
    .pc_src    (pc_src),
    .jump_addr (jump_addr)
  );
endmodule
