// tb_nop_cpu: runs the nop CPU on the five-nop program for 9999 cycles,
// the simulator's default timeout, and expects thePc = 0x270f at the end,
// the PC to rise by exactly one per cycle, Stat AOK throughout, and the
// instruction memory output at address 0 to be the five 0x10 bytes.
module tb_nop_cpu;
  import y86_pkg::*;
  localparam int MB = 1024;
  int checks = 0, failures = 0;
  logic        clk = 0, rst, load_en;
  logic [63:0] load_addr, pc;
  logic [7:0]  load_data;
  logic [79:0] i10bytes;
  stat_e       stat;

  nop_cpu #(.MEM_BYTES(MB)) dut (.clk, .rst, .load_en, .load_addr, .load_data, .pc, .i10bytes, .stat);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [79:0] got, input logic [79:0] e);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s = %h, expected %h", what, got, e); end
  endtask

  task automatic load(input int a, input logic [7:0] v);
    @(negedge clk);
    load_en = 1; load_addr = 64'(a); load_data = v;
    @(posedge clk); #1;
    load_en = 0;
  endtask

  initial begin
    rst = 1; load_en = 0; load_addr = '0; load_data = '0;
    for (int i = 0; i < MB; i++) load(i, (i < 5) ? 8'h10 : 8'h00);
    @(negedge clk);
    expect_eq("pc after reset", 80'(pc), 80'h0);
    expect_eq("i10bytes@0", i10bytes, 80'h10_1010_1010);
    rst = 0;
    for (int c = 1; c <= 9999; c++) begin
      @(posedge clk); #1;
      if (c % 97 == 0 || c < 8) begin
        expect_eq("pc", 80'(pc), 80'(c));
        expect_eq("stat", 80'(stat), 80'(STAT_AOK));
      end
    end
    expect_eq("pc after 9999 cycles", 80'(pc), 80'h270f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
