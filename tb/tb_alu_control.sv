// tb_alu_control: exhaustive test of ALU control over all ALUOp and function
// codes. Expected ALUCtrl values come from a table written out in the
// testbench: R-type takes the function field, I-type ALUOps map to
// add/sub/and/or. Combinational: one check every 1 ns.
module tb_alu_control;
  import mips16_pkg::*;

  alu_op_e    op;
  logic [2:0] func;
  alu_ctrl_e  ctl;
  int checks = 0, failures = 0;

  alu_control dut (.alu_op(op), .func(func), .alu_ctrl(ctl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp;
    for (int o = 0; o < 5; o++)
      for (int f = 0; f < 8; f++) begin
        op = alu_op_e'(o[2:0]); func = f[2:0];
        #1;
        case (o)
          0: exp = f[2:0];
          1: exp = 3'd0;
          2: exp = 3'd1;
          3: exp = 3'd4;
          default: exp = 3'd5;
        endcase
        checks++;
        if (3'(ctl) !== exp) begin
          failures++;
          $display("FAIL aluop=%0d func=%0d ctl=%0d exp=%0d", o, f, ctl, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
