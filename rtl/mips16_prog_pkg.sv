// mips16_prog_pkg: the built-in test program of the instruction memory.
//
// A short program that uses every instruction of the set at least once:
// all eight R-type operations (shifts with sa = 1), addi with a negative
// immediate (sign extension), andi/ori (zero extension), sw/lw with positive
// and negative offsets, a taken and a not-taken forward beq, a counted loop
// closed by a backward beq, a forward jump, a write to $0 (ignored) and a
// final jump to itself that acts as halt. The program is this design's own.
//
// Expected state once it reaches the halt loop at word 31:
//   $0=0 $1=3 $2=3 $3=0x007D $4=0x0040 $5=5 $6=3 $7=3
//   mem[0x00]=3  mem[0x3F]=0xFFFD  mem[0x43]=5
package mips16_prog_pkg;
  import mips16_pkg::*;

  localparam int PROG_LEN = 32;
  localparam word_t NOP = 16'h0000;   // add $0,$0,$0
  localparam int HALT_PC = 31;

  localparam word_t PROG [PROG_LEN] = '{
    enc_i(OP_ADDI, 0, 1, 5),          //  0 addi $1,$0,5
    enc_i(OP_ADDI, 0, 2, -3),         //  1 addi $2,$0,-3
    enc_r(ALU_ADD, 1, 2, 3, 0),       //  2 add  $3,$1,$2
    enc_r(ALU_SUB, 1, 2, 4, 0),       //  3 sub  $4,$1,$2
    enc_r(ALU_SLL, 0, 1, 5, 1),       //  4 sll  $5,$1,1
    enc_r(ALU_SRL, 0, 2, 6, 1),       //  5 srl  $6,$2,1
    enc_r(ALU_SRA, 0, 2, 7, 1),       //  6 sra  $7,$2,1
    enc_r(ALU_AND, 1, 2, 5, 0),       //  7 and  $5,$1,$2
    enc_r(ALU_OR,  1, 2, 6, 0),       //  8 or   $6,$1,$2
    enc_r(ALU_XOR, 1, 2, 7, 0),       //  9 xor  $7,$1,$2
    enc_i(OP_ANDI, 2, 3, 'h7F),       // 10 andi $3,$2,0x7F
    enc_i(OP_ORI,  0, 4, 'h40),       // 11 ori  $4,$0,0x40
    enc_i(OP_SW,   4, 1, 3),          // 12 sw   $1,3($4)
    enc_i(OP_SW,   4, 2, -1),         // 13 sw   $2,-1($4)
    enc_i(OP_LW,   4, 5, 3),          // 14 lw   $5,3($4)
    enc_i(OP_LW,   4, 6, -1),         // 15 lw   $6,-1($4)
    enc_i(OP_BEQ,  5, 1, 2),          // 16 beq  $5,$1,+2   (taken -> 19)
    enc_i(OP_ADDI, 0, 7, 1),          // 17 skipped
    enc_i(OP_ADDI, 0, 7, 2),          // 18 skipped
    enc_i(OP_BEQ,  5, 2, 5),          // 19 beq  $5,$2,+5   (not taken)
    enc_i(OP_ADDI, 0, 7, 3),          // 20 addi $7,$0,3
    enc_i(OP_ADDI, 0, 6, 0),          // 21 addi $6,$0,0
    enc_i(OP_ADDI, 6, 6, 1),          // 22 loop: addi $6,$6,1
    enc_i(OP_BEQ,  6, 7, 1),          // 23 beq  $6,$7,+1   (exit -> 25)
    enc_i(OP_BEQ,  0, 0, -3),         // 24 beq  $0,$0,-3   (-> 22)
    enc_j(27),                        // 25 j    27
    enc_i(OP_ADDI, 0, 6, 9),          // 26 skipped
    enc_i(OP_SW,   0, 6, 0),          // 27 sw   $6,0($0)
    enc_i(OP_ADDI, 0, 0, 7),          // 28 addi $0,$0,7    (no effect)
    enc_i(OP_LW,   0, 1, 0),          // 29 lw   $1,0($0)
    enc_r(ALU_ADD, 1, 0, 2, 0),       // 30 add  $2,$1,$0
    enc_j(HALT_PC)                    // 31 j    31         (halt)
  };
endpackage
