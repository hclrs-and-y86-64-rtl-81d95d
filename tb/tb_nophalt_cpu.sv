// tb_nophalt_cpu: five nops then halt (stops after 6 cycles at pc 5 with
// HLT), and a program with an invalid opcode (stops with INS). Checks the
// PC every cycle, the Stat of each cycle and that a stopped CPU stays put.
module tb_nophalt_cpu;
  import y86_pkg::*;
  localparam int MB = 1024;
  int checks = 0, failures = 0;
  logic        clk = 0, rst, load_en, halted;
  logic [63:0] load_addr, pc;
  logic [7:0]  load_data;
  logic [31:0] cycles;
  stat_e       stat, final_stat;

  nophalt_cpu #(.MEM_BYTES(MB)) dut (.clk, .rst, .load_en, .load_addr, .load_data,
    .pc, .stat, .halted, .final_stat, .cycles);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [63:0] got, input logic [63:0] e);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s = %h, expected %h", what, got, e); end
  endtask

  task automatic run_program(input logic [7:0] prog [$], input int stop_pc, input stat_e stop_stat);
    rst = 1;
    for (int i = 0; i < MB; i++) begin
      @(negedge clk);
      load_en = 1; load_addr = 64'(i); load_data = (i < prog.size()) ? prog[i] : 8'h00;
    end
    @(negedge clk);
    load_en = 0;
    @(negedge clk);
    rst = 0;
    for (int c = 0; c <= stop_pc + 4; c++) begin
      // during cycle c (0-based) the CPU executes the byte at pc
      expect_eq("pc", pc, 64'((c <= stop_pc) ? c : stop_pc));
      expect_eq("halted", 64'(halted), 64'(c > stop_pc));
      if (c <= stop_pc)
        expect_eq("stat", 64'(stat), 64'((c == stop_pc) ? stop_stat : STAT_AOK));
      @(negedge clk);
    end
    expect_eq("cycles run", 64'(cycles), 64'(stop_pc + 1));
    expect_eq("final stat", 64'(final_stat), 64'(stop_stat));
  endtask

  initial begin
    logic [7:0] p1 [$], p2 [$];
    load_en = 0; load_addr = '0; load_data = '0;
    p1 = '{8'h10, 8'h10, 8'h10, 8'h10, 8'h10, 8'h00};
    run_program(p1, 5, STAT_HLT);
    p2 = '{8'h10, 8'h10, 8'h10, 8'h60, 8'h10, 8'h00};
    run_program(p2, 3, STAT_INS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
