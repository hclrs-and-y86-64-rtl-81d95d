// nop_cpu: the smallest CPU, one that treats every byte as a nop.
//
// A 64-bit PC register (initial value 0) addresses the instruction memory,
// and an adder feeds PC + 1 back to it, so the PC steps through memory one
// byte per clock and never stops. Stat is always AOK. The memory output
// i10bytes is not used by the CPU and is brought out as a port. Memory
// contents are written through the loader port (load_*).
// Timing: one instruction per cycle; after N cycles from reset pc = N.
module nop_cpu
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
  output stat_e       stat
);

  logic [63:0] p_pc;
  logic [63:0] unused_rd, unused_dbg;

  reg_bank #(.WIDTH(64), .RESET_VALUE(64'd0)) u_pc (
    .clk, .rst, .stall(1'b0), .d(p_pc), .q(pc)
  );

  assign p_pc = pc + 64'd1;
  assign stat = STAT_AOK;

  y86_mem #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk, .pc, .i10bytes,
    .daddr('0), .dwe(1'b0), .dwdata('0), .drdata(unused_rd),
    .load_en, .load_addr, .load_data,
    .dbg_addr('0), .dbg_data(unused_dbg)
  );

endmodule
