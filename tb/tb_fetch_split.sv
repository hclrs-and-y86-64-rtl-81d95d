// tb_fetch_split: checks field extraction, instruction length and valP.
// Includes the debug-dump example where the bytes 10 70 13 ... give
// icode 1 and dest 0x1370, and the encodings of the mov instructions.
module tb_fetch_split;
  import y86_pkg::*;
  int checks = 0, failures = 0;
  logic [63:0] pc, valC, dest, valP;
  logic [79:0] i10bytes;
  icode_e      icode;
  logic [3:0]  ifun, rA, rB, len;
  logic        valid;

  fetch_split dut (.pc, .i10bytes, .icode, .ifun, .rA, .rB, .valC, .dest, .len, .valid, .valP);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [63:0] got, input logic [63:0] e);
    checks++;
    if (got !== e) begin
      failures++;
      $display("FAIL %s = %h, expected %h", what, got, e);
    end
  endtask

  // instruction lengths from the encoding table
  function automatic int ref_len(input int ic);
    case (ic)
      0, 1, 9:        return 1;
      2, 6, 10, 11:   return 2;
      7, 8:           return 9;
      3, 4, 5:        return 10;
      default:        return 1;
    endcase
  endfunction

  initial begin
    // bytes 10 70 13 00 ... (nopjmp.yo at address 0)
    pc = 64'h0; i10bytes = 80'h137010;
    #1;
    expect_eq("icode", 64'(icode), 64'h1);
    expect_eq("dest", dest, 64'h1370);
    expect_eq("valP", valP, 64'h1);
    // jmp at 0x001: 70 13 00 .. 00
    pc = 64'h1; i10bytes = 80'h00_0000000000000013_70;
    #1;
    expect_eq("icode", 64'(icode), 64'h7);
    expect_eq("dest", dest, 64'h13);
    expect_eq("valP", valP, 64'ha);
    // irmovq $0x0102030405060708, %rbx : 30 F3 08 07 06 05 04 03 02 01
    pc = 64'h100; i10bytes = 80'h0102030405060708_F3_30;
    #1;
    expect_eq("icode", 64'(icode), 64'h3);
    expect_eq("rA", 64'(rA), 64'hF);
    expect_eq("rB", 64'(rB), 64'h3);
    expect_eq("valC", valC, 64'h0102030405060708);
    expect_eq("valP", valP, 64'h10a);
    // rrmovq %rax, %rdx : 20 02
    pc = 64'h10; i10bytes = {64'hFFFF_FFFF_FFFF_FFFF, 16'h02_20};
    #1;
    expect_eq("rA", 64'(rA), 64'h0);
    expect_eq("rB", 64'(rB), 64'h2);
    expect_eq("valP", valP, 64'h12);
    // random bytes
    for (int n = 0; n < 300; n++) begin
      logic [79:0] r;
      r = {16'($urandom), $urandom, $urandom};
      pc = {$urandom, $urandom};
      i10bytes = r;
      #1;
      expect_eq("ifun", 64'(ifun), 64'(r[3:0]));
      expect_eq("icode", 64'(icode), 64'(r[7:4]));
      expect_eq("rB", 64'(rB), 64'(r[11:8]));
      expect_eq("rA", 64'(rA), 64'(r[15:12]));
      expect_eq("valC", valC, r[79:16]);
      expect_eq("dest", dest, r[71:8]);
      expect_eq("len", 64'(len), 64'(ref_len(int'(r[7:4]))));
      expect_eq("valid", 64'(valid), 64'(r[7:4] <= 4'hB));
      expect_eq("valP", valP, pc + 64'(ref_len(int'(r[7:4]))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
