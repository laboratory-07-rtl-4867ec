// instr_mem: read-only instruction memory, asynchronous read.
//
// 2**ADDR_W words of 16 bits, addressed by word (the PC counts in words, so
// consecutive instructions are at PC and PC+1). The low ADDR_W bits of the
// address select the word; the read is combinational, as a single-cycle
// processor fetches and executes in the same clock cycle.
//
// Contents: the built-in program of mips16_prog_pkg, the rest filled with
// NOP (add $0,$0,$0). If INIT_FILE is not empty, $readmemh loads that file
// over it instead. The depth and the built-in program are this design's own
// choices; the reference design only places an Instruction Memory after the PC.
module instr_mem
  import mips16_pkg::*;
#(
  parameter int unsigned ADDR_W    = 8,
  parameter string       INIT_FILE = ""
) (
  input  word_t addr,
  output word_t instr
);
  localparam int unsigned DEPTH = 2 ** ADDR_W;

  word_t rom [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++)
      rom[i] = (i < mips16_prog_pkg::PROG_LEN) ? mips16_prog_pkg::PROG[i]
                                               : mips16_prog_pkg::NOP;
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  assign instr = rom[addr[ADDR_W-1:0]];
endmodule
