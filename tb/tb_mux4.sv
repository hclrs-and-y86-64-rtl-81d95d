// tb_mux4: checks the 4:1 MUX against its truth table with random data.
module tb_mux4;
  int checks = 0, failures = 0;
  logic [1:0]  sel;
  logic [63:0] a, b, c, d, y, exp_y;

  mux4 #(.WIDTH(64)) dut (.sel, .a, .b, .c, .d, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      c = {$urandom, $urandom}; d = {$urandom, $urandom};
      sel = 2'(n);
      #1;
      exp_y = (n % 4 == 0) ? a : (n % 4 == 1) ? b : (n % 4 == 2) ? c : d;
      checks++;
      if (y !== exp_y) begin
        failures++;
        $display("FAIL sel=%0d y=%h expected %h", sel, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
