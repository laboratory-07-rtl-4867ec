// tb_mips16_cpu: runs the built-in program on the processor and compares it,
// cycle by cycle, with the instruction-level reference model.
//
// The enable input is held low on random cycles. While an instruction is
// displayed, the PC, instruction, PC+1, operands, immediate, ALU result,
// memory data, write-back value, write address, control signals, branch
// target and jump address must match the model. When enable is high the
// instruction commits at the clock edge (one instruction per enabled cycle);
// when it is low nothing may change. At the halt loop the register file and
// the stored memory words are compared with hand-worked values. Each
// mechanism (taken and not-taken branch, jump, lw, sw, every ALU operation,
// a held cycle, a write to $0) must occur at least once. 10 ns clock.
module tb_mips16_cpu;
  import mips16_pkg::*;
  import mips16_ref_pkg::*;

  logic clk = 0, rst, en;
  word_t pc, instr, pc_plus1, rd1, rd2, ext_imm, alu_res, mem_data, wd, branch_addr, jump_addr;
  logic zero, pc_src;
  alu_ctrl_e alu_ctrl;
  reg_addr_t wa;
  ctrl_t ctrl;
  int checks = 0, failures = 0;
  int n_taken = 0, n_not_taken = 0, n_jump = 0, n_lw = 0, n_sw = 0, n_hold = 0, n_r0 = 0;
  int n_fn [8] = '{default: 0};

  mips16_cpu dut (
    .clk(clk), .rst(rst), .en(en), .pc(pc), .instr(instr), .pc_plus1(pc_plus1),
    .rd1(rd1), .rd2(rd2), .ext_imm(ext_imm), .alu_res(alu_res), .mem_data(mem_data),
    .wd(wd), .branch_addr(branch_addr), .jump_addr(jump_addr), .zero(zero),
    .pc_src(pc_src), .alu_ctrl(alu_ctrl), .wa(wa), .ctrl(ctrl)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(exp_t e);
    logic [7:0] bits;
    bits = {ctrl.reg_dst, ctrl.ext_op, ctrl.alu_src, ctrl.branch, ctrl.jump,
            ctrl.mem_write, ctrl.mem_to_reg, ctrl.reg_write};
    checks++;
    if (pc !== e.pc || instr !== e.instr || pc_plus1 !== e.pc_plus1 || rd1 !== e.rd1 ||
        rd2 !== e.rd2 || ext_imm !== e.ext_imm || alu_res !== e.alu_res ||
        mem_data !== e.mem_data || wd !== e.wd || bits !== e.ctrl_bits ||
        3'(ctrl.alu_op) !== e.alu_op || wa !== e.wa || pc_src !== e.taken ||
        (e.is_branch && branch_addr !== e.branch_addr) ||
        (e.is_jump && jump_addr !== e.jump_addr)) begin
      failures++;
      $display("FAIL pc=%h/%h instr=%h/%h rd1=%h/%h rd2=%h/%h imm=%h/%h alu=%h/%h md=%h/%h wd=%h/%h ctl=%b/%b",
               pc, e.pc, instr, e.instr, rd1, e.rd1, rd2, e.rd2, ext_imm, e.ext_imm,
               alu_res, e.alu_res, mem_data, e.mem_data, wd, e.wd, bits, e.ctrl_bits);
    end
  endtask

  task automatic expect_eq(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s = %h, expected %h", what, got, exp);
    end
  endtask

  initial begin
    ref_cpu m;
    exp_t e;
    int executed = 0;
    m = new();
    rst = 1; en = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    e = m.step();
    while (!(e.is_jump && e.next_pc == e.pc) && executed < 500) begin
      #1; compare(e);
      en = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (en) begin
        executed++;
        if (e.is_branch) begin if (e.taken) n_taken++; else n_not_taken++; end
        if (e.is_jump) n_jump++;
        if (e.ctrl_bits == 8'h63) n_lw++;
        if (e.mem_we) n_sw++;
        if (e.reg_we && e.wa == 0) n_r0++;
        n_fn[e.alu_fn]++;
        e = m.step();
      end else n_hold++;
      @(negedge clk);
    end
    // at the halt loop: run it twice more, it must stay there
    en = 1;
    repeat (2) begin #1; compare(e); @(posedge clk); @(negedge clk); end
    expect_eq("halt pc", pc, 16'd31);
    expect_eq("$0", dut.u_id.u_rf.regs[0], 16'h0000);
    expect_eq("$1", dut.u_id.u_rf.regs[1], 16'h0003);
    expect_eq("$2", dut.u_id.u_rf.regs[2], 16'h0003);
    expect_eq("$3", dut.u_id.u_rf.regs[3], 16'h007D);
    expect_eq("$4", dut.u_id.u_rf.regs[4], 16'h0040);
    expect_eq("$5", dut.u_id.u_rf.regs[5], 16'h0005);
    expect_eq("$6", dut.u_id.u_rf.regs[6], 16'h0003);
    expect_eq("$7", dut.u_id.u_rf.regs[7], 16'h0003);
    expect_eq("mem[00]", dut.u_mem.ram[8'h00], 16'h0003);
    expect_eq("mem[3F]", dut.u_mem.ram[8'h3F], 16'hFFFD);
    expect_eq("mem[43]", dut.u_mem.ram[8'h43], 16'h0005);
    // 33 instructions from reset to the halt loop, one per enabled cycle
    expect_eq("instructions", 16'(executed), 16'd33);
    $display("mechanisms: taken=%0d not_taken=%0d jump=%0d lw=%0d sw=%0d hold=%0d r0=%0d",
             n_taken, n_not_taken, n_jump, n_lw, n_sw, n_hold, n_r0);
    checks++;
    if (n_taken == 0 || n_not_taken == 0 || n_jump == 0 || n_lw == 0 || n_sw == 0 ||
        n_hold == 0 || n_r0 == 0) failures++;
    for (int f = 0; f < 8; f++) begin
      checks++;
      if (n_fn[f] == 0) begin failures++; $display("FAIL ALU op %0d never used", f); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
