// alu: the arithmetic/logic unit of the Y86-64 datapath.
//
// Computes y from a and b for the four operations the instruction set needs:
// add (addq and address arithmetic), sub, and, xor. Purely combinational.
// Following the Y86 convention "subq rA, rB" computes rB - rA, so with
// a = valA and b = valB, sub gives b - a. The operation codes are the usual
// OPq function codes (see y86_pkg). Condition codes are not produced.
module alu
  import y86_pkg::*;
#(
  parameter int unsigned WIDTH = 64
) (
  input  alu_op_e          op,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    unique case (op)
      ALU_ADD: y = b + a;
      ALU_SUB: y = b - a;
      ALU_AND: y = b & a;
      ALU_XOR: y = b ^ a;
    endcase
  end

endmodule
