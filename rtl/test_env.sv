// test_env: board-level top of the 16-bit single-cycle MIPS.
//
// Wraps the processor for a development board with eight switches, eight
// LEDs, a 4-digit seven-segment display (SSD) and push buttons:
// - `step` is the one-clock pulse of a debounced push button; each pulse
//   executes one instruction (it validates the PC update, RegWrite and
//   MemWrite). `rst` is a synchronous reset.
// - sw[7:5] selects the 16-bit value sent to the SSD driver (ssd_value):
//   000 instruction, 001 PC+1, 010 RD1, 011 RD2, 100 Ext_Imm, 101 ALURes,
//   110 MemData, 111 WD.
// - sw[0] selects the LEDs: 0 shows the eight 1-bit control signals,
//   led[7:0] = {RegDst, ExtOp, ALUSrc, Branch, Jump, MemWrite, MemtoReg,
//   RegWrite}; 1 shows ALUOp on led[2:0] and zeros above.
// The SSD driver and the button debouncer are not part of this RTL; their
// signals are ports. The switch assignments follow the reference design; the LED
// order is this design's choice. All outputs are combinational views of the
// current instruction.
module test_env
  import mips16_pkg::*;
#(
  parameter int unsigned IMEM_ADDR_W = 8,
  parameter int unsigned DMEM_ADDR_W = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       step,
  input  logic [7:0] sw,
  output word_t      ssd_value,
  output logic [7:0] led
);
  word_t     pc, instr, pc_plus1, rd1, rd2, ext_imm, alu_res, mem_data, wd;
  word_t     branch_addr, jump_addr;
  logic      zero, pc_src;
  alu_ctrl_e alu_ctrl;
  reg_addr_t wa;
  ctrl_t     ctrl;

  mips16_cpu #(
    .IMEM_ADDR_W(IMEM_ADDR_W),
    .DMEM_ADDR_W(DMEM_ADDR_W)
  ) u_cpu (
    .clk(clk), .rst(rst), .en(step),
    .pc(pc), .instr(instr), .pc_plus1(pc_plus1), .rd1(rd1), .rd2(rd2),
    .ext_imm(ext_imm), .alu_res(alu_res), .mem_data(mem_data), .wd(wd),
    .branch_addr(branch_addr), .jump_addr(jump_addr), .zero(zero),
    .pc_src(pc_src), .alu_ctrl(alu_ctrl), .wa(wa), .ctrl(ctrl)
  );

  always_comb begin
    case (sw[7:5])
      3'b000:  ssd_value = instr;
      3'b001:  ssd_value = pc_plus1;
      3'b010:  ssd_value = rd1;
      3'b011:  ssd_value = rd2;
      3'b100:  ssd_value = ext_imm;
      3'b101:  ssd_value = alu_res;
      3'b110:  ssd_value = mem_data;
      default: ssd_value = wd;
    endcase
  end

  assign led = sw[0] ? {5'b0, ctrl.alu_op}
                     : {ctrl.reg_dst, ctrl.ext_op, ctrl.alu_src, ctrl.branch,
                        ctrl.jump, ctrl.mem_write, ctrl.mem_to_reg, ctrl.reg_write};
endmodule
