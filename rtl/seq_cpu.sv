// seq_cpu: single-cycle (SEQ) processor for the full Y86-64 instruction set.
//
// One instruction per clock, in six conceptual stages that are all
// combinational except the final commit:
//   fetch      read ten bytes at PC, split them, compute valP = PC + length
//   decode     read srcA/srcB from the register file (valA, valB)
//   execute    ALU on aluA/aluB -> valE; OPq sets the condition codes;
//              Cnd is evaluated from the codes and ifun for jXX / cmovXX
//   memory     read (valM) or write the data memory
//   write back write valE to dstE and valM to dstM
//   PC update  valP, or valC (call, taken jXX), or valM (ret)
// PC, registers, condition codes and memory all change at the rising edge.
//
// The MUX settings per instruction:
//   srcA  rA for rrmovq/cmovXX, rmmovq, OPq, pushq, popq; else none
//   srcB  rB for mrmovq, rmmovq, OPq; %rsp for call, ret, pushq, popq
//   aluA  valA (rrmovq, OPq), valC (irmovq, rmmovq, mrmovq),
//         -8 (call, pushq), +8 (ret, popq);  aluB valB, or 0 for
//         rrmovq/irmovq;  ALU function ifun for OPq, add otherwise
//   addr  valE, except popq and ret, which use valB (the old %rsp)
//   data  valA, except call, which stores valP
//   dstE  rB (rrmovq if Cnd, irmovq, OPq), %rsp (call, ret, pushq, popq)
//   dstM  rA (mrmovq, popq); port M wins, so "popq %rsp" loads the value
// The stages, the srcA/srcB table, the ALU constants for the stack
// instructions, the popq/ret/call memory special cases and the two write
// ports follow the SEQ organisation. This design's own choices: the exact
// MUX settings not tabulated there (taken from the Y86-64 instruction
// definitions), and the flag and condition rules, which are the standard
// Y86-64 ones. Condition codes ZF, SF, OF start as Z=1 S=0 O=0.
//
// Stat: ADR when PC or a data access (all eight bytes) falls outside the
// MEM_BYTES memory, INS for an unknown icode or an OPq / jXX / cmovXX
// function code out of range, HLT for halt, AOK otherwise. The first cycle
// that is not AOK commits nothing and stops the CPU (stat_unit).
module seq_cpu
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
  output logic [31:0] cycles,
  output logic [2:0]  cc,          // {ZF, SF, OF}
  input  logic [3:0]  dbg_reg_num,
  output logic [63:0] dbg_reg_val,
  input  logic [63:0] dbg_mem_addr,
  output logic [63:0] dbg_mem_val
);

  // fetch
  logic [79:0] i10bytes;
  icode_e      icode;
  logic [3:0]  ifun, rA, rB, len;
  logic        instr_valid;
  logic [63:0] valC_v, dest, valP, valC;
  // decode .. write back
  logic [3:0]  srcA, srcB, dstE, dstM;
  logic [63:0] valA, valB, aluA, aluB, valE, valM, mem_addr, mem_data, new_pc;
  alu_op_e     alufun;
  logic        set_cc, cnd, mem_read, mem_write, commit;
  logic        imem_error, dmem_error, fun_error;
  logic        zf, sf, of;
  logic [2:0]  new_cc;

  reg_bank #(.WIDTH(64), .RESET_VALUE(64'd0)) u_pc (
    .clk, .rst, .stall(!commit), .d(new_pc), .q(pc)
  );

  // condition codes {ZF, SF, OF}, initially Z=1 S=0 O=0
  reg_bank #(.WIDTH(3), .RESET_VALUE(3'b100)) u_cc (
    .clk, .rst, .stall(!(commit && set_cc)), .d(new_cc), .q(cc)
  );

  y86_mem #(.MEM_BYTES(MEM_BYTES)) u_mem (
    .clk, .pc, .i10bytes,
    .daddr(mem_addr), .dwe(commit && mem_write), .dwdata(mem_data), .drdata(valM),
    .load_en, .load_addr, .load_data,
    .dbg_addr(dbg_mem_addr), .dbg_data(dbg_mem_val)
  );

  fetch_split u_split (
    .pc, .i10bytes, .icode, .ifun, .rA, .rB, .valC(valC_v), .dest,
    .len, .valid(instr_valid), .valP
  );

  // jXX and call carry their constant in bytes 1..8, the others in 2..9
  assign valC = (icode == I_JXX || icode == I_CALL) ? dest : valC_v;

  // ---------------- decode ----------------
  always_comb begin
    case (icode)
      I_RRMOVQ, I_RMMOVQ, I_OPQ, I_PUSHQ, I_POPQ: srcA = rA;
      default:                                    srcA = REG_NONE;
    endcase
    case (icode)
      I_MRMOVQ, I_RMMOVQ, I_OPQ:           srcB = rB;
      I_CALL, I_RET, I_PUSHQ, I_POPQ:      srcB = REG_RSP;
      default:                             srcB = REG_NONE;
    endcase
  end

  regfile #(.NREGS(15), .WIDTH(64)) u_rf (
    .clk, .rst,
    .srcA, .srcB, .valA, .valB,
    .dstE(commit ? dstE : REG_NONE), .valE,
    .dstM(commit ? dstM : REG_NONE), .valM,
    .dbg_num(dbg_reg_num), .dbg_val(dbg_reg_val)
  );

  // ---------------- execute ----------------
  always_comb begin
    case (icode)
      I_RRMOVQ, I_OPQ:              aluA = valA;
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ: aluA = valC;
      I_CALL, I_PUSHQ:              aluA = -64'sd8;
      I_RET, I_POPQ:                aluA = 64'd8;
      default:                      aluA = 64'd0;
    endcase
    case (icode)
      I_RRMOVQ, I_IRMOVQ: aluB = 64'd0;
      default:            aluB = valB;
    endcase
    alufun = (icode == I_OPQ) ? alu_op_e'(ifun[1:0]) : ALU_ADD;
    set_cc = (icode == I_OPQ);
  end

  alu #(.WIDTH(64)) u_alu (.op(alufun), .a(aluA), .b(aluB), .y(valE));

  // flags of the result; overflow for add and sub, clear for and/xor
  always_comb begin
    zf = (valE == 64'd0);
    sf = valE[63];
    case (alufun)
      ALU_ADD: of = (aluA[63] == aluB[63]) && (valE[63] != aluB[63]);
      ALU_SUB: of = (aluA[63] != aluB[63]) && (valE[63] != aluB[63]);
      default: of = 1'b0;
    endcase
    new_cc = {zf, sf, of};
  end

  // Cnd from the stored codes
  always_comb begin
    logic z, s, o;
    {z, s, o} = cc;
    case (ifun)
      4'd0:    cnd = 1'b1;               // always
      4'd1:    cnd = (s ^ o) | z;        // le
      4'd2:    cnd = s ^ o;              // l
      4'd3:    cnd = z;                  // e
      4'd4:    cnd = !z;                 // ne
      4'd5:    cnd = !(s ^ o);           // ge
      4'd6:    cnd = !(s ^ o) && !z;     // g
      default: cnd = 1'b0;
    endcase
  end

  // ---------------- memory ----------------
  always_comb begin
    mem_read  = (icode == I_MRMOVQ || icode == I_POPQ || icode == I_RET);
    mem_write = (icode == I_RMMOVQ || icode == I_PUSHQ || icode == I_CALL);
    mem_addr  = (icode == I_POPQ || icode == I_RET) ? valB : valE;
    mem_data  = (icode == I_CALL) ? valP : valA;
  end

  // ---------------- write back ----------------
  always_comb begin
    case (icode)
      I_RRMOVQ:                        dstE = cnd ? rB : REG_NONE;
      I_IRMOVQ, I_OPQ:                 dstE = rB;
      I_CALL, I_RET, I_PUSHQ, I_POPQ:  dstE = REG_RSP;
      default:                         dstE = REG_NONE;
    endcase
    dstM = (icode == I_MRMOVQ || icode == I_POPQ) ? rA : REG_NONE;
  end

  // ---------------- PC update ----------------
  always_comb begin
    case (icode)
      I_CALL:  new_pc = valC;
      I_JXX:   new_pc = cnd ? valC : valP;
      I_RET:   new_pc = valM;
      default: new_pc = valP;
    endcase
  end

  // ---------------- status ----------------
  always_comb begin
    imem_error = (pc >= 64'(MEM_BYTES));
    dmem_error = (mem_read || mem_write) && (mem_addr > 64'(MEM_BYTES - 8));
    fun_error  = ((icode == I_OPQ) && (ifun > 4'd3)) ||
                 ((icode == I_JXX || icode == I_RRMOVQ) && (ifun > 4'd6));
    if (imem_error || dmem_error)        stat = STAT_ADR;
    else if (!instr_valid || fun_error)  stat = STAT_INS;
    else if (icode == I_HALT)            stat = STAT_HLT;
    else                                 stat = STAT_AOK;
  end

  stat_unit u_stat (
    .clk, .rst, .stat, .commit, .halted, .final_stat, .cycles
  );

  a_frozen: assert property (@(posedge clk) disable iff (rst)
    halted |=> ($stable(pc) && $stable(cc)));

endmodule
