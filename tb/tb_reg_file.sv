// tb_reg_file: random test of the register file against a model array.
// Each cycle it drives random read/write addresses, data and write enable,
// checks both asynchronous reads before the edge (old contents), and updates
// the model after the edge. Checks that $0 reads zero after a write to it,
// and that reset clears every register. 10 ns clock.
module tb_reg_file;
  import mips16_pkg::*;

  logic clk = 0, rst, we;
  reg_addr_t ra1, ra2, wa;
  word_t wd, rd1, rd2;
  logic [15:0] model [8];
  int checks = 0, failures = 0;

  reg_file dut (.clk(clk), .rst(rst), .we(we), .ra1(ra1), .ra2(ra2), .wa(wa),
                .wd(wd), .rd1(rd1), .rd2(rd2));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    checks++;
    if (rd1 !== model[ra1] || rd2 !== model[ra2]) begin
      failures++;
      $display("FAIL ra1=%0d rd1=%h exp=%h ra2=%0d rd2=%h exp=%h",
               ra1, rd1, model[ra1], ra2, rd2, model[ra2]);
    end
  endtask

  initial begin
    rst = 1; we = 0; ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    @(negedge clk); @(negedge clk);
    rst = 0;
    for (int i = 0; i < 8; i++) model[i] = 0;
    for (int i = 0; i < 8; i++) begin
      ra1 = 3'(i); ra2 = 3'(7 - i); #1; check_reads();
    end
    for (int n = 0; n < 2000; n++) begin
      we = 1'($urandom); wa = 3'($urandom); wd = 16'($urandom);
      ra1 = (n % 3 == 0) ? wa : 3'($urandom); ra2 = 3'($urandom);
      if (n == 5) begin we = 1; wa = 0; wd = 16'hBEEF; end
      #1; check_reads();
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      @(negedge clk);
      we = 0; #1; check_reads();
    end
    ra1 = 0; ra2 = 0; #1; check_reads();
    // reset clears everything
    rst = 1; @(posedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 8; i++) model[i] = 0;
    for (int i = 0; i < 8; i++) begin
      ra1 = 3'(i); ra2 = 3'(i); #1; check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
