// tb_instr_decode: random test of the ID unit. Random instructions, write
// data and control inputs; checks the register reads of rs and rt against
// a register model, the write address (rd or rt by RegDst), the function
// and shift-amount fields and the extended immediate, then lets the write
// happen on the clock edge and updates the model ($0 stays zero). 10 ns clock.
module tb_instr_decode;
  import mips16_pkg::*;

  logic clk = 0, rst, reg_write, reg_dst, ext_op, sa;
  word_t instr, wd, rd1, rd2, ext_imm;
  logic [2:0] func;
  reg_addr_t wa;
  logic [15:0] model [8];
  int checks = 0, failures = 0;

  instr_decode dut (.clk(clk), .rst(rst), .instr(instr), .wd(wd), .reg_write(reg_write),
                    .reg_dst(reg_dst), .ext_op(ext_op), .rd1(rd1), .rd2(rd2),
                    .ext_imm(ext_imm), .func(func), .sa(sa), .wa(wa));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rs, rt, rd;
    logic [15:0] exp_imm;
    logic [2:0] exp_wa;
    rst = 1; reg_write = 0; reg_dst = 0; ext_op = 0; instr = 0; wd = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < 8; i++) model[i] = 0;
    for (int n = 0; n < 3000; n++) begin
      instr = 16'($urandom); wd = 16'($urandom);
      reg_write = 1'($urandom); reg_dst = 1'($urandom); ext_op = 1'($urandom);
      #1;
      rs = int'(instr[12:10]); rt = int'(instr[9:7]); rd = int'(instr[6:4]);
      exp_wa  = reg_dst ? 3'(rd) : 3'(rt);
      exp_imm = {{9{ext_op & instr[6]}}, instr[6:0]};
      checks++;
      if (rd1 !== model[rs] || rd2 !== model[rt] || wa !== exp_wa || ext_imm !== exp_imm
          || func !== instr[2:0] || sa !== instr[3]) begin
        failures++;
        $display("FAIL instr=%h rd1=%h/%h rd2=%h/%h wa=%0d/%0d imm=%h/%h", instr, rd1,
                 model[rs], rd2, model[rt], wa, exp_wa, ext_imm, exp_imm);
      end
      @(posedge clk);
      if (reg_write && exp_wa != 0) model[exp_wa] = wd;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
