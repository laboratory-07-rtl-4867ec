// instr_fetch: the IF unit - program counter, PC+1 adder, next-PC selection
// and instruction memory.
//
// The PC holds a word address. Each clock edge on which `en` is high it is
// loaded with the next PC, chosen as in the processor data path by two
// multiplexers in a row: PCSrc picks the branch target over PC+1, then Jump
// picks the jump address over that. The instruction at the current PC and
// PC+1 are combinational outputs, available in the same cycle.
//
// Timing: one instruction per clock cycle on which `en` is high; `rst` is
// synchronous and sets the PC to 0. PC+1 (instead of the 32-bit version's
// PC+4) follows from the 16-bit word-addressed memory. The enable input is
// this design's way of stepping the processor with a debounced button pulse.
module instr_fetch
  import mips16_pkg::*;
#(
  parameter int unsigned IMEM_ADDR_W = 8
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  logic  jump,
  input  logic  pc_src,
  input  word_t jump_addr,
  input  word_t branch_addr,
  output word_t pc,
  output word_t pc_plus1,
  output word_t instr
);
  word_t pc_q, pc_seq_or_branch, pc_next;

  assign pc_plus1         = pc_q + word_t'(1);
  assign pc_seq_or_branch = pc_src ? branch_addr : pc_plus1;
  assign pc_next          = jump ? jump_addr : pc_seq_or_branch;

  always_ff @(posedge clk) begin
    if (rst)     pc_q <= '0;
    else if (en) pc_q <= pc_next;
  end

  assign pc = pc_q;

  instr_mem #(.ADDR_W(IMEM_ADDR_W)) u_imem (
    .addr (pc_q),
    .instr(instr)
  );
endmodule
