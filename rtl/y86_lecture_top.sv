// y86_lecture_top: the six Y86-64 CPUs side by side.
//
// The CPUs are independent designs of increasing capability: the nop CPU
// (PC + 1 forever), the nop/halt CPU, the nop/jmp CPU, the addq CPU, the
// mov CPU (rrmovq, irmovq, mrmovq, rmmovq, halt) and the full-instruction-set
// SEQ CPU. They share only the clock and the synchronous reset; every other
// port of each CPU is brought out with a prefix (nop_, nh_, nj_, addq_,
// mov_, seq_). Each CPU has its own
// MEM_BYTES-byte memory, loaded a byte per clock through its load_* port
// while reset is held or before it runs.
module y86_lecture_top
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES = 1024
) (
  input  logic        clk,
  input  logic        rst,
  // nop CPU
  input  logic        nop_load_en,
  input  logic [63:0] nop_load_addr,
  input  logic [7:0]  nop_load_data,
  output logic [63:0] nop_pc,
  output logic [79:0] nop_i10bytes,
  output stat_e       nop_stat,
  // nop/halt CPU
  input  logic        nh_load_en,
  input  logic [63:0] nh_load_addr,
  input  logic [7:0]  nh_load_data,
  output logic [63:0] nh_pc,
  output stat_e       nh_stat,
  output logic        nh_halted,
  output stat_e       nh_final_stat,
  output logic [31:0] nh_cycles,
  // nop/jmp CPU
  input  logic        nj_load_en,
  input  logic [63:0] nj_load_addr,
  input  logic [7:0]  nj_load_data,
  output logic [63:0] nj_pc,
  output logic [79:0] nj_i10bytes,
  output stat_e       nj_stat,
  output logic        nj_halted,
  output stat_e       nj_final_stat,
  output logic [31:0] nj_cycles,
  // addq CPU
  input  logic        addq_load_en,
  input  logic [63:0] addq_load_addr,
  input  logic [7:0]  addq_load_data,
  input  logic        addq_init_en,
  input  logic [3:0]  addq_init_reg,
  input  logic [63:0] addq_init_val,
  output logic [63:0] addq_pc,
  output stat_e       addq_stat,
  input  logic [3:0]  addq_dbg_reg_num,
  output logic [63:0] addq_dbg_reg_val,
  // mov CPU
  input  logic        mov_load_en,
  input  logic [63:0] mov_load_addr,
  input  logic [7:0]  mov_load_data,
  output logic [63:0] mov_pc,
  output stat_e       mov_stat,
  output logic        mov_halted,
  output stat_e       mov_final_stat,
  output logic [31:0] mov_cycles,
  input  logic [3:0]  mov_dbg_reg_num,
  output logic [63:0] mov_dbg_reg_val,
  input  logic [63:0] mov_dbg_mem_addr,
  output logic [63:0] mov_dbg_mem_val,
  // SEQ CPU
  input  logic        seq_load_en,
  input  logic [63:0] seq_load_addr,
  input  logic [7:0]  seq_load_data,
  output logic [63:0] seq_pc,
  output stat_e       seq_stat,
  output logic        seq_halted,
  output stat_e       seq_final_stat,
  output logic [31:0] seq_cycles,
  output logic [2:0]  seq_cc,
  input  logic [3:0]  seq_dbg_reg_num,
  output logic [63:0] seq_dbg_reg_val,
  input  logic [63:0] seq_dbg_mem_addr,
  output logic [63:0] seq_dbg_mem_val
);

  nop_cpu #(.MEM_BYTES(MEM_BYTES)) u_nop (
    .clk, .rst,
    .load_en(nop_load_en), .load_addr(nop_load_addr), .load_data(nop_load_data),
    .pc(nop_pc), .i10bytes(nop_i10bytes), .stat(nop_stat)
  );

  nophalt_cpu #(.MEM_BYTES(MEM_BYTES)) u_nophalt (
    .clk, .rst,
    .load_en(nh_load_en), .load_addr(nh_load_addr), .load_data(nh_load_data),
    .pc(nh_pc), .stat(nh_stat), .halted(nh_halted),
    .final_stat(nh_final_stat), .cycles(nh_cycles)
  );

  nopjmp_cpu #(.MEM_BYTES(MEM_BYTES)) u_nopjmp (
    .clk, .rst,
    .load_en(nj_load_en), .load_addr(nj_load_addr), .load_data(nj_load_data),
    .pc(nj_pc), .i10bytes(nj_i10bytes), .stat(nj_stat), .halted(nj_halted),
    .final_stat(nj_final_stat), .cycles(nj_cycles)
  );

  addq_cpu #(.MEM_BYTES(MEM_BYTES)) u_addq (
    .clk, .rst,
    .load_en(addq_load_en), .load_addr(addq_load_addr), .load_data(addq_load_data),
    .init_en(addq_init_en), .init_reg(addq_init_reg), .init_val(addq_init_val),
    .pc(addq_pc), .stat(addq_stat),
    .dbg_reg_num(addq_dbg_reg_num), .dbg_reg_val(addq_dbg_reg_val)
  );

  mov_cpu #(.MEM_BYTES(MEM_BYTES), .HAS_RMMOVQ(1'b1)) u_mov (
    .clk, .rst,
    .load_en(mov_load_en), .load_addr(mov_load_addr), .load_data(mov_load_data),
    .pc(mov_pc), .stat(mov_stat), .halted(mov_halted),
    .final_stat(mov_final_stat), .cycles(mov_cycles),
    .dbg_reg_num(mov_dbg_reg_num), .dbg_reg_val(mov_dbg_reg_val),
    .dbg_mem_addr(mov_dbg_mem_addr), .dbg_mem_val(mov_dbg_mem_val)
  );

  seq_cpu #(.MEM_BYTES(MEM_BYTES)) u_seq (
    .clk, .rst,
    .load_en(seq_load_en), .load_addr(seq_load_addr), .load_data(seq_load_data),
    .pc(seq_pc), .stat(seq_stat), .halted(seq_halted),
    .final_stat(seq_final_stat), .cycles(seq_cycles), .cc(seq_cc),
    .dbg_reg_num(seq_dbg_reg_num), .dbg_reg_val(seq_dbg_reg_val),
    .dbg_mem_addr(seq_dbg_mem_addr), .dbg_mem_val(seq_dbg_mem_val)
  );

endmodule
