// tb_mem_unit: random test of the data memory against a model array.
// Checks that MemData follows the address combinationally (asynchronous
// read, including the zero initial contents), that a write lands only on
// the clock edge and only when MemWrite is 1, that only the low 8 address
// bits select the word, and that ALURes passes through. 10 ns clock.
module tb_mem_unit;
  import mips16_pkg::*;

  logic clk = 0, we;
  word_t addr, wdat, mem_data, alu_out;
  logic [15:0] model [256];
  int checks = 0, failures = 0;

  mem_unit dut (.clk(clk), .mem_write(we), .alu_res_in(addr), .rd2(wdat),
                .mem_data(mem_data), .alu_res_out(alu_out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (mem_data !== model[addr[7:0]] || alu_out !== addr) begin
      failures++;
      $display("FAIL addr=%h data=%h exp=%h", addr, mem_data, model[addr[7:0]]);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) model[i] = 0;
    we = 0; wdat = 0;
    @(negedge clk);
    for (int i = 0; i < 256; i += 17) begin addr = 16'(i); #1; check(); end
    for (int n = 0; n < 3000; n++) begin
      addr = 16'($urandom); wdat = 16'($urandom);
      if (n % 4 == 0) addr[7:0] = 8'($urandom_range(0, 7));
      we = 1'($urandom);
      #1; check();               // old value before the edge
      @(posedge clk);
      if (we) model[addr[7:0]] = wdat;
      @(negedge clk);
      we = 0;
      #1; check();               // new value after the edge
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
