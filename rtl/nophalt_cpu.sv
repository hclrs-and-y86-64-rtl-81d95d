// nophalt_cpu: a CPU that executes nop (0x10) and halt (0x00).
//
// The PC register (initial value 0) addresses the instruction memory and
// loads PC + 1 every cycle. A MUX on the opcode, bits 7:4 of the first
// fetched byte, gives the cycle's Stat: nop -> AOK, halt -> HLT, anything
// else -> INS. The Stat register (stat_unit) stops the CPU at the first
// cycle that is not AOK; that cycle does not advance the PC, so a stopped
// CPU shows the address of the halt (or bad) instruction.
// Outputs: pc, the current cycle's stat, halted, final_stat, cycles run.
module nophalt_cpu
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
  output stat_e       stat,
  output logic        halted,
  output stat_e       final_stat,
  output logic [31:0] cycles
);

  logic [79:0] i10bytes;
  logic [63:0] unused_rd, unused_dbg;
  logic        commit;
  icode_e      icode;

  reg_bank #(.WIDTH(64), .RESET_VALUE(64'd0)) u_pc (
    .clk, .rst, .stall(!commit), .d(pc + 64'd1), .q(pc)
  );

  y86_mem #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk, .pc, .i10bytes,
    .daddr('0), .dwe(1'b0), .dwdata('0), .drdata(unused_rd),
    .load_en, .load_addr, .load_data,
    .dbg_addr('0), .dbg_data(unused_dbg)
  );

  assign icode = icode_e'(i10bytes[7:4]);

  always_comb begin
    case (icode)
      I_NOP:   stat = STAT_AOK;
      I_HALT:  stat = STAT_HLT;
      default: stat = STAT_INS;
    endcase
  end

  stat_unit u_stat (
    .clk, .rst, .stat, .commit, .halted, .final_stat, .cycles
  );

endmodule
