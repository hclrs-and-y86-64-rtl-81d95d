// fetch_split: instruction split and length logic of the fetch stage.
//
// i10bytes holds the bytes at PC..PC+9 with the byte at PC in bits 7:0.
// The fields sit at fixed bit positions of the Y86-64 encoding:
//   ifun  = bits 3:0   (low nibble of byte 0)
//   icode = bits 7:4   (high nibble of byte 0)
//   rB    = bits 11:8  (low nibble of byte 1)
//   rA    = bits 15:12 (high nibble of byte 1)
//   valC  = bits 79:16 (bytes 2..9: the constant V or displacement D)
//   dest  = bits 71:8  (bytes 1..8: the target of jXX and call)
// From icode it also finds the instruction length given by the encoding
// table (1, 2, 9 or 10 bytes) and valP = pc + length, the address of the
// following instruction. icode values above 0xB are flagged invalid and get
// length 1. Purely combinational.
module fetch_split
  import y86_pkg::*;
(
  input  logic [63:0] pc,
  input  logic [79:0] i10bytes,
  output icode_e      icode,
  output logic [3:0]  ifun,
  output logic [3:0]  rA,
  output logic [3:0]  rB,
  output logic [63:0] valC,
  output logic [63:0] dest,
  output logic [3:0]  len,
  output logic        valid,
  output logic [63:0] valP
);

  assign ifun  = i10bytes[3:0];
  assign icode = icode_e'(i10bytes[7:4]);
  assign rB    = i10bytes[11:8];
  assign rA    = i10bytes[15:12];
  assign valC  = i10bytes[79:16];
  assign dest  = i10bytes[71:8];

  always_comb begin
    valid = 1'b1;
    unique case (icode)
      I_HALT, I_NOP, I_RET:                  len = 4'd1;
      I_RRMOVQ, I_OPQ, I_PUSHQ, I_POPQ:      len = 4'd2;
      I_JXX, I_CALL:                         len = 4'd9;
      I_IRMOVQ, I_RMMOVQ, I_MRMOVQ:          len = 4'd10;
      default: begin
        len   = 4'd1;
        valid = 1'b0;
      end
    endcase
  end

  assign valP = pc + 64'(len);

endmodule
