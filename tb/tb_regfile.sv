// tb_regfile: random reads and two-port writes against a model; register
// 15 reads 0 and ignores writes; port M wins a same-register conflict.
module tb_regfile;
  int checks = 0, failures = 0;
  logic        clk = 0, rst;
  logic [3:0]  srcA, srcB, dstE, dstM, dbg_num;
  logic [63:0] valA, valB, valE, valM, dbg_val;
  logic [63:0] model [16];

  regfile #(.NREGS(15), .WIDTH(64)) dut (.clk, .rst, .srcA, .srcB, .valA, .valB,
    .dstE, .valE, .dstM, .valM, .dbg_num, .dbg_val);

  always #50 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int i = 0; i < 16; i++) begin
      srcA = 4'(i); srcB = 4'(15 - i); dbg_num = 4'(i);
      #1;
      checks += 3;
      if (valA !== model[i])      begin failures++; $display("FAIL valA r%0d %h %h", i, valA, model[i]); end
      if (valB !== model[15 - i]) begin failures++; $display("FAIL valB r%0d", 15 - i); end
      if (dbg_val !== model[i])   begin failures++; $display("FAIL dbg r%0d", i); end
    end
  endtask

  initial begin
    rst = 1; dstE = 4'hF; dstM = 4'hF; valE = '0; valM = '0;
    @(posedge clk); #1;
    rst = 0;
    for (int i = 0; i < 16; i++) model[i] = '0;
    check_reads();
    for (int n = 0; n < 300; n++) begin
      dstE = 4'($urandom); dstM = (n % 7 == 0) ? dstE : 4'($urandom);
      valE = {$urandom, $urandom}; valM = {$urandom, $urandom};
      #1;
      // writes are not visible before the edge
      check_reads();
      @(posedge clk);
      if (dstE != 4'hF) model[dstE] = valE;
      if (dstM != 4'hF) model[dstM] = valM;
      #1;
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
