// mem_unit: the MEM unit - the data memory, a RAM with asynchronous read and
// synchronous write.
//
// ALURes is the word address (its low ADDR_W bits select one of 2**ADDR_W
// 16-bit words). MemData is the word at that address, combinationally. On a
// rising clock edge with `mem_write` high, RD2 is written to that address;
// the caller gates MemWrite with the step enable. ALURes is also passed on
// unchanged to the write-back stage, as in the reference MEM data path.
// The depth and the zero initial contents are this design's own choices.
module mem_unit
  import mips16_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic  clk,
  input  logic  mem_write,
  input  word_t alu_res_in,
  input  word_t rd2,
  output word_t mem_data,
  output word_t alu_res_out
);
  localparam int unsigned DEPTH = 2 ** ADDR_W;

  word_t ram [DEPTH];
  logic [ADDR_W-1:0] addr;

  initial for (int i = 0; i < DEPTH; i++) ram[i] = '0;

  assign addr = alu_res_in[ADDR_W-1:0];

  always_ff @(posedge clk) begin
    if (mem_write) ram[addr] <= rd2;
  end

  assign mem_data    = ram[addr];
  assign alu_res_out = alu_res_in;
endmodule
