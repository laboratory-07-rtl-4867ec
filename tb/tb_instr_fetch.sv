// tb_instr_fetch: drives the IF unit with random enable, Jump, PCSrc, jump
// and branch addresses, and checks against a PC model: reset to 0, hold
// when enable is low, else jump address over branch address over PC+1.
// Each cycle the instruction must be the word of the built-in program (or
// NOP) at the current PC, and PC+1 must be the PC plus one. 10 ns clock.
module tb_instr_fetch;
  import mips16_pkg::*;
  import mips16_ref_pkg::*;

  logic clk = 0, rst, en, jump, pc_src;
  word_t jump_addr, branch_addr, pc, pc_plus1, instr;
  logic [15:0] pc_m;
  int checks = 0, failures = 0;
  int n_jump = 0, n_branch = 0, n_hold = 0;

  instr_fetch dut (.clk(clk), .rst(rst), .en(en), .jump(jump), .pc_src(pc_src),
                   .jump_addr(jump_addr), .branch_addr(branch_addr), .pc(pc),
                   .pc_plus1(pc_plus1), .instr(instr));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [15:0] exp_i;
    exp_i = (pc_m[7:0] < PROG_LEN) ? PROG_HEX[pc_m[7:0]] : 16'h0000;
    checks++;
    if (pc !== pc_m || pc_plus1 !== 16'(pc_m + 1) || instr !== exp_i) begin
      failures++;
      $display("FAIL pc=%h exp=%h pc1=%h instr=%h exp=%h", pc, pc_m, pc_plus1, instr, exp_i);
    end
  endtask

  initial begin
    rst = 1; en = 0; jump = 0; pc_src = 0; jump_addr = 0; branch_addr = 0;
    @(negedge clk); @(negedge clk);
    rst = 0; pc_m = 0;
    #1; check();
    for (int n = 0; n < 3000; n++) begin
      en = ($urandom_range(0, 3) != 0);
      jump = ($urandom_range(0, 5) == 0);
      pc_src = ($urandom_range(0, 4) == 0);
      jump_addr = 16'($urandom_range(0, 40)); branch_addr = 16'($urandom_range(0, 300));
      if (n % 100 == 99) begin rst = 1; end
      @(posedge clk);
      if (rst) pc_m = 0;
      else if (en) begin
        if (jump) begin pc_m = jump_addr; n_jump++; end
        else if (pc_src) begin pc_m = branch_addr; n_branch++; end
        else pc_m = pc_m + 1;
      end else n_hold++;
      @(negedge clk);
      rst = 0;
      #1; check();
    end
    checks++;
    if (n_jump == 0 || n_branch == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
