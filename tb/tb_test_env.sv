// tb_test_env: end-to-end test of the board-level top at its default sizes.
//
// Steps the processor through the whole built-in program the way it is used
// on the board: between two one-cycle step pulses the clock keeps running
// with step low, and the testbench walks sw[7:5] through all eight display
// selections and sw[0] through both LED modes, comparing the display value
// and the LEDs with the instruction-level reference model. Cycles with step
// low must change nothing. After the halt loop it resets the processor
// (registers and PC, not the data memory) and runs the program again to the
// halt loop, now over the data memory left by the first run.
// Mechanisms counted, each needed at least once: taken and not-taken
// branch, jump, load, store, every ALU operation, held cycles, reset
// restart, sign- and zero-extended immediates. 10 ns clock.
module tb_test_env;
  import mips16_ref_pkg::*;

  logic clk = 0, rst, step;
  logic [7:0] sw, led;
  logic [15:0] ssd_value;
  int checks = 0, failures = 0;
  int n_taken = 0, n_not_taken = 0, n_jump = 0, n_lw = 0, n_sw = 0, n_hold = 0;
  int n_sext = 0, n_zext = 0, n_restart = 0;
  int n_fn [8] = '{default: 0};

  test_env dut (.clk(clk), .rst(rst), .step(step), .sw(sw), .ssd_value(ssd_value), .led(led));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Walk all switch settings for the instruction now on display.
  task automatic probe(exp_t e);
    logic [15:0] exp_v [8];
    exp_v = '{e.instr, e.pc_plus1, e.rd1, e.rd2, e.ext_imm, e.alu_res, e.mem_data, e.wd};
    for (int s = 0; s < 8; s++) begin
      for (int l = 0; l < 2; l++) begin
        sw = {3'(s), 4'($urandom), 1'(l)};
        @(negedge clk);
        n_hold++;
        checks++;
        if (ssd_value !== exp_v[s] ||
            led !== (l == 1 ? {5'b0, e.alu_op} : e.ctrl_bits)) begin
          failures++;
          $display("FAIL pc=%h sw=%b ssd=%h exp=%h led=%b", e.pc, sw, ssd_value, exp_v[s], led);
        end
      end
    end
  endtask

  task automatic run_to_halt(ref_cpu m, output int executed);
    exp_t e;
    executed = 0;
    e = m.step();
    while (!(e.is_jump && e.next_pc == e.pc) && executed < 500) begin
      probe(e);
      if (e.is_branch) begin if (e.taken) n_taken++; else n_not_taken++; end
      if (e.is_jump) n_jump++;
      if (e.ctrl_bits == 8'h63) n_lw++;
      if (e.mem_we) n_sw++;
      if (e.ctrl_bits[6] && e.ext_imm[15]) n_sext++;
      if (!e.ctrl_bits[6] && e.ctrl_bits[5] && e.instr[6]) n_zext++;
      n_fn[e.alu_fn]++;
      step = 1;
      @(negedge clk);
      step = 0;
      executed++;
      e = m.step();
    end
    probe(e);
  endtask

  initial begin
    ref_cpu m;
    int executed;
    m = new();
    rst = 1; step = 0; sw = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    run_to_halt(m, executed);
    checks++;
    if (executed != 33) begin failures++; $display("FAIL first run took %0d instructions", executed); end
    // restart from reset; the data memory keeps what the first run stored
    rst = 1; @(negedge clk); rst = 0;
    m.reset();
    n_restart++;
    run_to_halt(m, executed);
    checks++;
    if (executed != 33) begin failures++; $display("FAIL second run took %0d instructions", executed); end
    $display("mechanisms: taken=%0d not_taken=%0d jump=%0d lw=%0d sw=%0d hold=%0d sext=%0d zext=%0d restart=%0d",
             n_taken, n_not_taken, n_jump, n_lw, n_sw, n_hold, n_sext, n_zext, n_restart);
    checks++;
    if (n_taken == 0 || n_not_taken == 0 || n_jump == 0 || n_lw == 0 || n_sw == 0 ||
        n_hold == 0 || n_sext == 0 || n_zext == 0 || n_restart == 0) failures++;
    for (int f = 0; f < 8; f++) begin
      checks++;
      if (n_fn[f] == 0) begin failures++; $display("FAIL ALU op %0d never used", f); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
