// tb_reg_bank: reset value, load on the rising edge, hold while stalled.
module tb_reg_bank;
  int checks = 0, failures = 0;
  logic        clk = 0, rst, stall;
  logic [63:0] d, q, model;

  reg_bank #(.WIDTH(64), .RESET_VALUE(64'h5A)) dut (.clk, .rst, .stall, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; stall = 0; d = '0;
    @(posedge clk); #1;
    checks++;
    if (q !== 64'h5A) begin failures++; $display("FAIL reset value %h", q); end
    model = 64'h5A;
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      d = {$urandom, $urandom};
      stall = ($urandom % 3) == 0;
      rst = ($urandom % 50) == 0;
      // value must not change before the edge
      #2;
      checks++;
      if (q !== model) begin failures++; $display("FAIL before edge q=%h model=%h", q, model); end
      @(posedge clk);
      if (rst) model = 64'h5A; else if (!stall) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL after edge q=%h model=%h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
