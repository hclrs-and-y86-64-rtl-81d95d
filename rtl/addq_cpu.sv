// addq_cpu: a CPU whose only instruction is addq rA, rB.
//
// Each cycle it fetches the two-byte instruction at PC, splits off rA
// (bits 15:12) and rB (bits 11:8), reads both registers, adds them in the
// ALU and writes the sum back to rB at the clock edge, while the PC
// register loads PC + 2. The opcode is not checked and Stat is always AOK,
// so the CPU runs until reset.
// The init port (init_en/init_reg/init_val) is this design's addition for
// presetting registers before a run: while init_en is high it writes
// init_val to init_reg through the register file's M port and the PC and
// the E write are held. dbg_reg_num/dbg_reg_val observe a register.
module addq_cpu
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_en,
  input  logic [63:0] load_addr,
  input  logic [7:0]  load_data,
  input  logic        init_en,
  input  logic [3:0]  init_reg,
  input  logic [63:0] init_val,
  output logic [63:0] pc,
  output stat_e       stat,
  input  logic [3:0]  dbg_reg_num,
  output logic [63:0] dbg_reg_val
);

  logic [79:0] i10bytes;
  logic [63:0] unused_rd, unused_dbg;
  icode_e      opcode;
  logic [3:0]  ifun, rA, rB, len;
  logic        valid;
  logic [63:0] valC, dest, len_valP;
  logic [63:0] valA, valB, valE;

  reg_bank #(.WIDTH(64), .RESET_VALUE(64'd0)) u_pc (
    .clk, .rst, .stall(init_en), .d(pc + 64'd2), .q(pc)
  );

  y86_mem #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk, .pc, .i10bytes,
    .daddr('0), .dwe(1'b0), .dwdata('0), .drdata(unused_rd),
    .load_en, .load_addr, .load_data,
    .dbg_addr('0), .dbg_data(unused_dbg)
  );

  fetch_split u_split (
    .pc, .i10bytes, .icode(opcode), .ifun, .rA, .rB, .valC, .dest,
    .len, .valid, .valP(len_valP)
  );

  alu #(.WIDTH(64)) u_alu (.op(ALU_ADD), .a(valA), .b(valB), .y(valE));

  regfile #(.NREGS(15), .WIDTH(64)) u_rf (
    .clk, .rst,
    .srcA(rA), .srcB(rB), .valA, .valB,
    .dstE(init_en ? REG_NONE : rB), .valE,
    .dstM(init_en ? init_reg : REG_NONE), .valM(init_val),
    .dbg_num(dbg_reg_num), .dbg_val(dbg_reg_val)
  );

  assign stat = STAT_AOK;

endmodule
