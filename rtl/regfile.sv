// regfile: the Y86-64 register file, 15 registers of 64 bits.
//
// Two read ports (srcA -> valA, srcB -> valB) are combinational: the value
// follows the register number after a propagation delay. Two write ports
// (dstE/valE and dstM/valM) write on the rising clock edge. Register number
// 15 (REG_NONE) always reads as 0 and writes to it are ignored, which is
// how an instruction says "no register". If both write ports name the same
// register, port M wins (this design's choice). Synchronous reset clears
// every register. dbg_num/dbg_val is a third read port for observation.
module regfile
  import y86_pkg::*;
#(
  parameter int unsigned NREGS = 15,
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [3:0]       srcA,
  input  logic [3:0]       srcB,
  output logic [WIDTH-1:0] valA,
  output logic [WIDTH-1:0] valB,
  input  logic [3:0]       dstE,
  input  logic [WIDTH-1:0] valE,
  input  logic [3:0]       dstM,
  input  logic [WIDTH-1:0] valM,
  input  logic [3:0]       dbg_num,
  output logic [WIDTH-1:0] dbg_val
);

  logic [WIDTH-1:0] regs [NREGS];

  function automatic logic [WIDTH-1:0] rd(input logic [3:0] n);
    if (32'(n) < NREGS) return regs[n];
    else                return '0;
  endfunction

  assign valA    = rd(srcA);
  assign valB    = rd(srcB);
  assign dbg_val = rd(dbg_num);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      for (int i = 0; i < NREGS; i++) begin
        if (32'(dstM) == i)      regs[i] <= valM;
        else if (32'(dstE) == i) regs[i] <= valE;
      end
    end
  end

endmodule
