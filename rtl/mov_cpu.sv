// mov_cpu: single-cycle Y86-64 CPU for the four mov instructions.
//
//   rrmovq rA, rB      2 0 rA rB       rB <- rA                 PC += 2
//   irmovq V, rB       3 0 F  rB V     rB <- V                  PC += 10
//   mrmovq D(rB), rA   5 0 rA rB D     rA <- M8[D + rB]         PC += 10
//   rmmovq rA, D(rB)   4 0 rA rB D     M8[D + rB] <- rA         PC += 10
//   halt               0 0             stop (Stat HLT)
//
// Everything happens in one clock cycle. Fetch: the PC addresses memory,
// fetch_split cuts the ten bytes into fields and gives the next PC (PC + 2
// or PC + 10). Decode: srcA = rA (rrmovq, rmmovq), srcB = rB (mrmovq,
// rmmovq), else register 15. Execute: the ALU adds D and the value of rB
// to form the data address. Memory: mrmovq reads eight bytes, rmmovq writes
// the value of rA there at the clock edge. Write back: one register write
// port; a 4-input MUX picks valA (rrmovq), V (irmovq) or the memory value
// (mrmovq), and the destination is rB, rB, rA respectively, register 15 for
// anything else. All state (PC, register, memory) changes at the same
// rising edge.
//
// Any other opcode gives Stat INS. The first cycle whose Stat is not AOK
// commits nothing and stops the CPU (stat_unit). nop is not decoded. With
// HAS_RMMOVQ = 0 the CPU is the smaller mov-to-register CPU, and rmmovq is
// an invalid instruction. Instruction and data accesses go to one memory,
// so a store can change code. The Stat encoding for this CPU and the
// single write port are this design's choices.
module mov_cpu
  import y86_pkg::*;
#(
  parameter int unsigned MEM_BYTES  = 1024,
  parameter bit          HAS_RMMOVQ = 1'b1
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
  output logic [31:0] cycles,
  input  logic [3:0]  dbg_reg_num,
  output logic [63:0] dbg_reg_val,
  input  logic [63:0] dbg_mem_addr,
  output logic [63:0] dbg_mem_val
);

  // fetch
  logic [79:0] i10bytes;
  icode_e      icode;
  logic [3:0]  ifun, rA, rB, len;
  logic        valid;
  logic [63:0] valC, dest, valP;
  // decode / execute / memory / write back
  logic [3:0]  srcA, srcB, dstE;
  logic [63:0] valA, valB, valE, valM, wb_val;
  logic [1:0]  wb_sel;
  logic        is_rmmovq, mem_we, commit;

  reg_bank #(.WIDTH(64), .RESET_VALUE(64'd0)) u_pc (
    .clk, .rst, .stall(!commit), .d(valP), .q(pc)
  );

  y86_mem #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk, .pc, .i10bytes,
    .daddr(valE), .dwe(mem_we), .dwdata(valA), .drdata(valM),
    .load_en, .load_addr, .load_data,
    .dbg_addr(dbg_mem_addr), .dbg_data(dbg_mem_val)
  );

  fetch_split u_split (
    .pc, .i10bytes, .icode, .ifun, .rA, .rB, .valC, .dest, .len, .valid, .valP
  );

  // "convert opcode": control signals from icode
  assign is_rmmovq = HAS_RMMOVQ && (icode == I_RMMOVQ);

  always_comb begin
    srcA   = REG_NONE;
    srcB   = REG_NONE;
    dstE   = REG_NONE;
    wb_sel = 2'd3;
    stat   = STAT_AOK;
    unique case (icode)
      I_RRMOVQ: begin srcA = rA; dstE = rB; wb_sel = 2'd0; end
      I_IRMOVQ: begin            dstE = rB; wb_sel = 2'd1; end
      I_MRMOVQ: begin srcB = rB; dstE = rA; wb_sel = 2'd2; end
      I_RMMOVQ: begin
        if (is_rmmovq) begin srcA = rA; srcB = rB; end
        else stat = STAT_INS;
      end
      I_HALT:   stat = STAT_HLT;
      default:  stat = STAT_INS;
    endcase
  end

  stat_unit u_stat (
    .clk, .rst, .stat, .commit, .halted, .final_stat, .cycles
  );

  regfile #(.NREGS(15), .WIDTH(64)) u_rf (
    .clk, .rst,
    .srcA, .srcB, .valA, .valB,
    .dstE(commit ? dstE : REG_NONE), .valE(wb_val),
    .dstM(REG_NONE), .valM('0),
    .dbg_num(dbg_reg_num), .dbg_val(dbg_reg_val)
  );

  // execute: address = D + value of rB
  alu #(.WIDTH(64)) u_alu (.op(ALU_ADD), .a(valC), .b(valB), .y(valE));

  assign mem_we = commit && is_rmmovq;

  // write back value MUX
  mux4 #(.WIDTH(64)) u_wb_mux (
    .sel(wb_sel), .a(valA), .b(valC), .c(valM), .d(64'd0), .y(wb_val)
  );

  // A stopped CPU changes no state.
  a_frozen_pc: assert property (@(posedge clk) disable iff (rst)
    halted |=> $stable(pc));
  a_store_only_rmmovq: assert property (@(posedge clk) disable iff (rst)
    mem_we |-> (icode == I_RMMOVQ && stat == STAT_AOK));

endmodule
