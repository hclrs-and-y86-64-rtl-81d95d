// stat_unit: the status (Stat) register that starts and stops a CPU.
//
// Each cycle the CPU presents the Stat of the instruction it is executing.
// While it is AOK, commit is high and the cycle's PC, register and memory
// updates take effect. The first cycle whose Stat is not AOK (HLT or INS)
// commits nothing: halted goes high at the following edge, final_stat keeps
// that Stat and the CPU stays frozen until reset. cycles counts every cycle
// run, the stopping one included, so a program of seven instructions ending
// in halt reports 7 cycles. Reset (start) clears the counter and resumes.
module stat_unit
  import y86_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  stat_e       stat,
  output logic        commit,
  output logic        halted,
  output stat_e       final_stat,
  output logic [31:0] cycles
);

  assign commit = !halted && (stat == STAT_AOK);

  always_ff @(posedge clk) begin
    if (rst) begin
      halted     <= 1'b0;
      final_stat <= STAT_AOK;
      cycles     <= '0;
    end else if (!halted) begin
      cycles <= cycles + 32'd1;
      if (stat != STAT_AOK) begin
        halted     <= 1'b1;
        final_stat <= stat;
      end
    end
  end

endmodule
