// tb_addq_cpu: the worked example (addq %rax,%rdx; addq %rbx,%rdx with
// rax = 10, rbx = 20, rdx = 30: after cycle 1 PC = 2, rdx = 40; after
// cycle 2 PC = 4, rdx = 60), then random addq programs against a model.
module tb_addq_cpu;
  import y86_pkg::*;
  localparam int MB = 1024;
  int checks = 0, failures = 0;
  logic        clk = 0, rst, load_en, init_en;
  logic [63:0] load_addr, pc, init_val, dbg_reg_val;
  logic [7:0]  load_data;
  logic [3:0]  init_reg, dbg_reg_num;
  stat_e       stat;
  logic [63:0] model [16];

  addq_cpu #(.MEM_BYTES(MB)) dut (.clk, .rst, .load_en, .load_addr, .load_data,
    .init_en, .init_reg, .init_val, .pc, .stat, .dbg_reg_num, .dbg_reg_val);

  always #50 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [63:0] got, input logic [63:0] e);
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
    load_en = 0; rst = 0; init_en = 1;
    for (int r = 0; r < 16; r++) model[r] = '0;
  endtask

  task automatic set_reg(input int r, input logic [63:0] v);
    init_en = 1; init_reg = 4'(r); init_val = v;
    @(negedge clk);
    if (r != 15) model[r] = v;
  endtask

  task automatic check_regs(input string when);
    for (int r = 0; r < 16; r++) begin
      dbg_reg_num = 4'(r);
      #1;
      expect_eq($sformatf("%s r%0d", when, r), dbg_reg_val, model[r]);
    end
  endtask

  initial begin
    logic [7:0] p [$];
    load_en = 0; load_addr = '0; load_data = '0; init_en = 0; init_reg = 4'hF;
    init_val = '0; dbg_reg_num = '0;
    // worked example
    p = '{8'h60, 8'h02, 8'h60, 8'h32};
    load_program(p);
    set_reg(0, 64'd10); set_reg(3, 64'd20); set_reg(2, 64'd30);
    init_en = 0; init_reg = 4'hF;
    expect_eq("pc initially", pc, 64'h0);
    @(negedge clk);
    model[2] = 64'd40;
    expect_eq("pc after cycle 1", pc, 64'h2);
    check_regs("after cycle 1");
    @(negedge clk);
    model[2] = 64'd60;
    expect_eq("pc after cycle 2", pc, 64'h4);
    check_regs("after cycle 2");
    expect_eq("stat", 64'(stat), 64'(STAT_AOK));
    // random programs
    for (int run = 0; run < 4; run++) begin
      int n;
      logic [3:0] ra [$], rb [$];
      n = 60;
      p = {};
      for (int i = 0; i < n; i++) begin
        ra.push_back(4'($urandom)); rb.push_back(4'($urandom));
        p.push_back(8'h60); p.push_back({ra[i], rb[i]});
      end
      load_program(p);
      for (int r = 0; r < 15; r++) set_reg(r, {$urandom, $urandom});
      init_en = 0; init_reg = 4'hF;
      for (int i = 0; i < n; i++) begin
        expect_eq("pc", pc, 64'(2 * i));
        @(negedge clk);
        if (rb[i] != 4'hF) model[rb[i]] = model[ra[i]] + model[rb[i]];
      end
      check_regs("random run");
      ra = {}; rb = {};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
