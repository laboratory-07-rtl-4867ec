// tb_instr_mem: reads every word of the instruction memory through the
// asynchronous read port and compares it with the hand-encoded built-in
// program (NOP = 0000 beyond it). Also checks that only the low 8 address
// bits are used. Combinational: one check every 1 ns.
module tb_instr_mem;
  import mips16_pkg::*;
  import mips16_ref_pkg::*;

  word_t addr, instr;
  int checks = 0, failures = 0;

  instr_mem dut (.addr(addr), .instr(instr));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp;
    for (int i = 0; i < 512; i++) begin
      addr = 16'(i) | (i >= 256 ? 16'hA000 : 16'h0000);
      #1;
      exp = ((i % 256) < PROG_LEN) ? PROG_HEX[i % 256] : 16'h0000;
      checks++;
      if (instr !== exp) begin
        failures++;
        $display("FAIL addr=%h instr=%h exp=%h", addr, instr, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
