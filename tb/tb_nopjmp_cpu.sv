// tb_nopjmp_cpu: runs nopjmp.yo (nop; jmp C; B: jmp D; C: jmp B; D: nop;
// nop; halt) and expects the PC sequence 0x0 0x1 0x13 0xa 0x1c 0x1d 0x1e,
// 7 cycles run, Stat HLT and the PC left at 0x1e, plus i10bytes = 0x137010
// in the first cycle. A second program ends in an invalid opcode.
module tb_nopjmp_cpu;
  import y86_pkg::*;
  localparam int MB = 1024;
  int checks = 0, failures = 0;
  logic        clk = 0, rst, load_en, halted;
  logic [63:0] load_addr, pc;
  logic [7:0]  load_data;
  logic [79:0] i10bytes;
  logic [31:0] cycles;
  stat_e       stat, final_stat;

  nopjmp_cpu #(.MEM_BYTES(MB)) dut (.clk, .rst, .load_en, .load_addr, .load_data,
    .pc, .i10bytes, .stat, .halted, .final_stat, .cycles);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [79:0] got, input logic [79:0] e);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s = %h, expected %h", what, got, e); end
  endtask

  task automatic load_program(input logic [7:0] prog [$]);
    rst = 1;
    for (int i = 0; i < MB; i++) begin
      @(negedge clk);
      load_en = 1; load_addr = 64'(i); load_data = (i < prog.size()) ? prog[i] : 8'h00;
    end
    @(negedge clk);
    load_en = 0;
    @(negedge clk);
    rst = 0;
  endtask

  task automatic run_trace(input logic [63:0] trace [$], input stat_e stop_stat);
    for (int c = 0; c < trace.size() + 3; c++) begin
      if (c < trace.size()) begin
        expect_eq("pc", 80'(pc), 80'(trace[c]));
        expect_eq("stat", 80'(stat), 80'((c == trace.size() - 1) ? stop_stat : STAT_AOK));
      end else begin
        expect_eq("pc frozen", 80'(pc), 80'(trace[trace.size() - 1]));
        expect_eq("halted", 80'(halted), 80'h1);
      end
      @(negedge clk);
    end
    expect_eq("cycles run", 80'(cycles), 80'(trace.size()));
    expect_eq("final stat", 80'(final_stat), 80'(stop_stat));
  endtask

  initial begin
    logic [7:0] p [$];
    logic [63:0] t [$];
    load_en = 0; load_addr = '0; load_data = '0;
    // nopjmp.yo
    p = '{8'h10,
          8'h70, 8'h13, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
          8'h70, 8'h1c, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
          8'h70, 8'h0a, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
          8'h10, 8'h10, 8'h00};
    load_program(p);
    expect_eq("i10bytes@0", i10bytes, 80'h0000_0000_0000_0013_7010);
    t = '{64'h0, 64'h1, 64'h13, 64'ha, 64'h1c, 64'h1d, 64'h1e};
    run_trace(t, STAT_HLT);
    // nop; jmp 0x100; ... 0x100: nop; 0xF0 (invalid)
    p = '{8'h10, 8'h70, 8'h00, 8'h01, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
    for (int i = p.size(); i < 256; i++) p.push_back(8'h00);
    p.push_back(8'h10); p.push_back(8'hF0);
    load_program(p);
    t = '{64'h0, 64'h1, 64'h100, 64'h101};
    run_trace(t, STAT_INS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
