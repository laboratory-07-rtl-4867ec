// tb_exec_unit: random test of the EX unit. For each ALUOp (and, for
// R-type, each function code), ALUSrc and shift amount, the expected ALU
// result, Zero flag and branch target PC+1+Ext_Imm are computed in the
// testbench from the raw inputs. Combinational: one check every 1 ns.
module tb_exec_unit;
  import mips16_pkg::*;

  word_t pc_plus1, rd1, rd2, ext_imm, branch_addr, alu_res;
  logic [2:0] func;
  logic sa, alu_src, zero;
  alu_op_e alu_op;
  alu_ctrl_e alu_ctrl;
  int checks = 0, failures = 0;

  exec_unit dut (
    .pc_plus1(pc_plus1), .rd1(rd1), .rd2(rd2), .ext_imm(ext_imm), .func(func),
    .sa(sa), .alu_src(alu_src), .alu_op(alu_op), .branch_addr(branch_addr),
    .alu_res(alu_res), .zero(zero), .alu_ctrl(alu_ctrl)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] b, exp;
    int fn;
    for (int n = 0; n < 3000; n++) begin
      pc_plus1 = 16'($urandom); rd1 = 16'($urandom); ext_imm = 16'($urandom);
      rd2 = (n % 7 == 0) ? rd1 : 16'($urandom);
      func = 3'($urandom); sa = 1'($urandom); alu_src = 1'($urandom);
      alu_op = alu_op_e'(3'($urandom_range(0, 4)));
      #1;
      b = alu_src ? ext_imm : rd2;
      case (int'(alu_op))
        0: fn = int'(func);
        1: fn = 0;
        2: fn = 1;
        3: fn = 4;
        default: fn = 5;
      endcase
      case (fn)
        0: exp = rd1 + b;
        1: exp = rd1 - b;
        2: exp = sa ? {b[14:0], 1'b0} : b;
        3: exp = sa ? {1'b0, b[15:1]} : b;
        4: exp = rd1 & b;
        5: exp = rd1 | b;
        6: exp = rd1 ^ b;
        default: exp = sa ? {b[15], b[15:1]} : b;
      endcase
      checks++;
      if (alu_res !== exp || zero !== (exp == 0) || branch_addr !== 16'(pc_plus1 + ext_imm)
          || int'(alu_ctrl) != fn) begin
        failures++;
        $display("FAIL aluop=%0d func=%0d src=%b res=%h exp=%h ba=%h", alu_op, func, alu_src,
                 alu_res, exp, branch_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
