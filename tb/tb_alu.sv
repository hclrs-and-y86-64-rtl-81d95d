// tb_alu: checks add, sub (b - a), and, xor on random and corner operands.
module tb_alu;
  import y86_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e     op;
  logic [63:0] a, b, y, exp_y;

  alu #(.WIDTH(64)) dut (.op, .a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input alu_op_e o, input logic [63:0] x, input logic [63:0] z,
                       input logic [63:0] e);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== e) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h y=%h expected %h", o, x, z, y, e);
    end
  endtask

  initial begin
    check(ALU_ADD, 64'd10, 64'd30, 64'd40);
    check(ALU_ADD, 64'd20, 64'd40, 64'd60);
    check(ALU_ADD, 64'hFFFF_FFFF_FFFF_FFFF, 64'd1, 64'd0);
    check(ALU_SUB, 64'd3, 64'd10, 64'd7);
    check(ALU_SUB, 64'd1, 64'd0, 64'hFFFF_FFFF_FFFF_FFFF);
    check(ALU_AND, 64'hF0F0, 64'hFF00, 64'hF000);
    check(ALU_XOR, 64'hF0F0, 64'hFF00, 64'h0FF0);
    for (int n = 0; n < 400; n++) begin
      logic [63:0] x, z, e;
      alu_op_e o;
      x = {$urandom, $urandom};
      z = {$urandom, $urandom};
      o = alu_op_e'(n % 4);
      case (o)
        ALU_ADD: e = x + z;
        ALU_SUB: e = z - x;
        ALU_AND: e = x & z;
        default: e = x ^ z;
      endcase
      check(o, x, z, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
