// nopjmp_cpu: a CPU that executes nop, jmp Dest and halt.
//
// The fetched bytes are split into icode (bits 7:4) and dest (bits 71:8,
// the eight bytes after the opcode byte). The next PC is chosen by a MUX
// on icode: nop -> PC + 1, jmp -> dest, anything else -> 0xBADBADBAD (never
// loaded, because such an instruction stops the CPU). Stat is AOK for nop
// and jmp, HLT for halt and INS otherwise; the Stat register freezes the
// CPU in the first cycle that is not AOK. The jump condition field is not
// examined: every icode 7 jumps.
// Timing: one instruction per clock; cycles counts the halt cycle too.
module nopjmp_cpu
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 1024
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        load_en,
  input  logic [63:0] load_addr,
  input  logic [7:0]  load_data,
  output logic [63:0] pc,
  output logic [79:0] i10bytes,
  output stat_e       stat,
  output logic        halted,
  output stat_e       final_stat,
  output logic [31:0] cycles
);

  logic [63:0] unused_rd, unused_dbg;
  logic        commit;
  icode_e      icode;
  logic [3:0]  ifun, rA, rB, len;
  logic        valid;
  logic [63:0] valC, dest, len_valP, valP;

  reg_bank #(.WIDTH(64), .RESET_VALUE(64'd0)) u_pc (
    .clk, .rst, .stall(!commit), .d(valP), .q(pc)
  );

  y86_mem #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk, .pc, .i10bytes,
    .daddr('0), .dwe(1'b0), .dwdata('0), .drdata(unused_rd),
    .load_en, .load_addr, .load_data,
    .dbg_addr('0), .dbg_data(unused_dbg)
  );

  fetch_split u_split (
    .pc, .i10bytes, .icode, .ifun, .rA, .rB, .valC, .dest,
    .len, .valid, .valP(len_valP)
  );

  always_comb begin
    case (icode)
      I_NOP:   valP = pc + 64'd1;
      I_JXX:   valP = dest;
      default: valP = BAD_PC;
    endcase
    case (icode)
      I_NOP, I_JXX: stat = STAT_AOK;
      I_HALT:       stat = STAT_HLT;
      default:      stat = STAT_INS;
    endcase
  end

  stat_unit u_stat (
    .clk, .rst, .stat, .commit, .halted, .final_stat, .cycles
  );

endmodule
