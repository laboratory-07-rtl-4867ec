// tb_main_control: checks the control signals for each of the eight opcodes
// against a table written out in the testbench as bit vectors
// {RegDst,ExtOp,ALUSrc,Branch,Jump,MemWrite,MemtoReg,RegWrite} and ALUOp.
// Combinational: one check every 1 ns.
module tb_main_control;
  import mips16_pkg::*;

  logic [2:0] opcode;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  main_control dut (.opcode(opcode), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_bits [8] = '{8'h81, 8'h61, 8'h63, 8'h64, 8'h50, 8'h21, 8'h21, 8'h08};
    logic [2:0] exp_op   [8] = '{3'd0, 3'd1, 3'd1, 3'd1, 3'd2, 3'd3, 3'd4, 3'd1};
    logic [7:0] got;
    for (int o = 0; o < 8; o++) begin
      opcode = o[2:0];
      #1;
      got = {ctrl.reg_dst, ctrl.ext_op, ctrl.alu_src, ctrl.branch,
             ctrl.jump, ctrl.mem_write, ctrl.mem_to_reg, ctrl.reg_write};
      checks++;
      if (got !== exp_bits[o] || 3'(ctrl.alu_op) !== exp_op[o]) begin
        failures++;
        $display("FAIL opcode=%0d bits=%b exp=%b aluop=%0d exp=%0d",
                 o, got, exp_bits[o], ctrl.alu_op, exp_op[o]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
