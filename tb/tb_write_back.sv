// tb_write_back: random test of the write-back multiplexer, PCSrc = Branch
// AND Zero and the jump address {PC+1[15:13], target}. Expected values are
// formed in the testbench. Combinational: one check every 1 ns.
module tb_write_back;
  import mips16_pkg::*;

  logic m2r, branch, zero, pc_src;
  word_t alu_res, mem_data, pc_plus1, wd, jump_addr;
  logic [12:0] target;
  int checks = 0, failures = 0;

  write_back dut (
    .mem_to_reg(m2r), .alu_res(alu_res), .mem_data(mem_data), .branch(branch),
    .zero(zero), .pc_plus1(pc_plus1), .target(target), .wd(wd),
    .pc_src(pc_src), .jump_addr(jump_addr)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_wd, exp_ja;
    logic exp_src;
    for (int n = 0; n < 1000; n++) begin
      m2r = 1'($urandom); branch = 1'($urandom); zero = 1'($urandom);
      alu_res = 16'($urandom); mem_data = 16'($urandom);
      pc_plus1 = 16'($urandom); target = 13'($urandom);
      #1;
      exp_wd  = m2r ? mem_data : alu_res;
      exp_src = branch && zero;
      exp_ja  = (pc_plus1 & 16'hE000) | {3'b000, target};
      checks++;
      if (wd !== exp_wd || pc_src !== exp_src || jump_addr !== exp_ja) begin
        failures++;
        $display("FAIL wd=%h/%h pcsrc=%b/%b ja=%h/%h", wd, exp_wd, pc_src, exp_src,
                 jump_addr, exp_ja);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
