// tb_stat_unit: commit while AOK, stop at the first other Stat, keep it,
// count cycles including the stopping one, restart on reset.
module tb_stat_unit;
  import y86_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst, commit, halted;
  stat_e       stat, final_stat;
  logic [31:0] cycles;

  stat_unit dut (.clk, .rst, .stat, .commit, .halted, .final_stat, .cycles);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] e);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s = %0d, expected %0d", what, got, e); end
  endtask

  initial begin
    for (int run = 0; run < 20; run++) begin
      int stop_at;
      stat_e stop_stat;
      stop_at   = 1 + ($urandom % 30);
      stop_stat = (run % 2 != 0) ? STAT_HLT : STAT_INS;
      rst = 1; stat = STAT_AOK;
      @(posedge clk); #1;
      rst = 0;
      expect_eq("cycles after reset", cycles, 0);
      for (int c = 1; c <= stop_at + 5; c++) begin
        stat = (c < stop_at) ? STAT_AOK : (c == stop_at) ? stop_stat : stat_e'($urandom % 5);
        #1;
        expect_eq("commit", 32'(commit), 32'(c < stop_at));
        expect_eq("halted", 32'(halted), 32'(c > stop_at));
        @(posedge clk); #1;
        expect_eq("cycles", cycles, (c < stop_at) ? c : stop_at);
      end
      expect_eq("final_stat", 32'(final_stat), 32'(stop_stat));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
