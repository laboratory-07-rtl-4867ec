// tb_ext_unit: exhaustive test of the immediate extender: all 128 immediates
// with ExtOp = 0 (zero fill) and ExtOp = 1 (sign fill). The expected value is
// computed with integer arithmetic. Combinational: one check every 1 ns.
module tb_ext_unit;
  import mips16_pkg::*;

  logic ext_op;
  logic [6:0] imm;
  word_t ext_imm;
  int checks = 0, failures = 0;

  ext_unit dut (.ext_op(ext_op), .imm(imm), .ext_imm(ext_imm));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    logic [15:0] exp;
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 128; i++) begin
        ext_op = 1'(e); imm = 7'(i);
        #1;
        v = (e == 1 && i >= 64) ? i - 128 : i;
        exp = 16'(v);
        checks++;
        if (ext_imm !== exp) begin
          failures++;
          $display("FAIL ext_op=%0d imm=%h got=%h exp=%h", e, i, ext_imm, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
