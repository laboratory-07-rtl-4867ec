// reg_file: 8 x 16-bit register file, two read ports, one write port.
//
// Reads are asynchronous (combinational from the read addresses); the write
// happens on the rising clock edge when `we` is high. Register $0 always
// reads as zero and ignores writes, as in MIPS. A synchronous `rst` clears
// all registers. Both the zero register and the reset are this design's own
// choices; the reference design only gives the read/write ports of the register file.
// A read of the register being written returns the old value until the edge.
module reg_file
  import mips16_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      we,
  input  reg_addr_t ra1,
  input  reg_addr_t ra2,
  input  reg_addr_t wa,
  input  word_t     wd,
  output word_t     rd1,
  output word_t     rd2
);
  localparam int unsigned NREGS = 2 ** REG_AW;

  word_t regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (ra1 == '0) ? '0 : regs[ra1];
  assign rd2 = (ra2 == '0) ? '0 : regs[ra2];
endmodule
