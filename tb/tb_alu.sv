// tb_alu: self-checking test of the ALU. Every operation is applied to
// corner and random operands with both shift amounts; the expected result is
// computed bit by bit in the testbench (shifts by explicit bit moves,
// subtraction as two's-complement addition) and the Zero flag is checked
// against the expected result. Combinational: one check every 1 ns.
module tb_alu;
  import mips16_pkg::*;

  word_t a, b, res;
  logic sa, zero;
  alu_ctrl_e ctl;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .sa(sa), .alu_ctrl(ctl), .res(res), .zero(zero));

  function automatic logic [15:0] model(int op, logic [15:0] x, logic [15:0] y, logic s);
    case (op)
      0: return x + y;
      1: return x + ~y + 16'd1;
      2: return s ? {y[14:0], 1'b0} : y;
      3: return s ? {1'b0, y[15:1]} : y;
      4: return x & y;
      5: return x | y;
      6: return x ^ y;
      default: return s ? {y[15], y[15:1]} : y;
    endcase
  endfunction

  task automatic check(int op, logic [15:0] x, logic [15:0] y, logic s);
    logic [15:0] exp;
    a = x; b = y; sa = s; ctl = alu_ctrl_e'(op[2:0]);
    #1;
    exp = model(op, x, y, s);
    checks++;
    if (res !== exp || zero !== (exp == 16'd0)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h sa=%b res=%h zero=%b exp=%h", op, x, y, s, res, zero, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] corners [6] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF, 16'h5A5A};
    for (int op = 0; op < 8; op++)
      for (int i = 0; i < 6; i++)
        for (int j = 0; j < 6; j++)
          for (int s = 0; s < 2; s++)
            check(op, corners[i], corners[j], 1'(s));
    for (int n = 0; n < 2000; n++)
      check(int'($urandom_range(0, 7)), 16'($urandom), 16'($urandom), 1'($urandom));
    // Zero flag on equal operands (the beq case)
    check(1, 16'h1234, 16'h1234, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
