// y86_pkg: constants and types shared by the Y86-64 teaching CPUs.
//
// Instruction codes (the high nibble of the first instruction byte) follow
// the Y86-64 encoding table. Register 15 is REG_NONE: it reads as zero and
// writes to it are dropped, which is how an instruction that writes no
// register is expressed. Stat values: AOK is 1, as a simulator state dump
// prints it; HLT = 2, ADR = 3 and INS = 4 are the standard Y86-64 codes.
// The ALU operation codes are the usual Y86 OPq function codes.
package y86_pkg;

  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,
    I_IRMOVQ = 4'h3,
    I_RMMOVQ = 4'h4,
    I_MRMOVQ = 4'h5,
    I_OPQ    = 4'h6,
    I_JXX    = 4'h7,
    I_CALL   = 4'h8,
    I_RET    = 4'h9,
    I_PUSHQ  = 4'hA,
    I_POPQ   = 4'hB
  } icode_e;

  typedef enum logic [3:0] {
    STAT_AOK = 4'h1,
    STAT_HLT = 4'h2,
    STAT_ADR = 4'h3,
    STAT_INS = 4'h4
  } stat_e;

  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,
    ALU_SUB = 2'd1,
    ALU_AND = 2'd2,
    ALU_XOR = 2'd3
  } alu_op_e;

  localparam logic [3:0] REG_RSP  = 4'h4;
  localparam logic [3:0] REG_NONE = 4'hF;

  // Value the nop/jmp CPU sends to the PC for an instruction it cannot
  // execute; the CPU stops in that cycle, so it is never loaded.
  localparam logic [63:0] BAD_PC = 64'h0000_000B_ADBA_DBAD;

endpackage
