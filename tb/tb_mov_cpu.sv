// tb_mov_cpu: directed and random programs of rrmovq, irmovq, mrmovq and
// rmmovq ending in halt, checked against an instruction-level model: the
// PC in every cycle, the cycle count (one per instruction plus the halt),
// all registers and the data area at the end. A second instance built as
// the mov-to-register CPU (HAS_RMMOVQ = 0) must stop with INS on rmmovq.
module tb_mov_cpu;
  import y86_pkg::*;
  localparam int MB = 1024;
  localparam int DATA_LO = 'h200;
  int checks = 0, failures = 0;
  logic        clk = 0, rst, load_en, halted, halted2;
  logic [63:0] load_addr, pc, pc2, dbg_reg_val, dbg_mem_addr, dbg_mem_val, unused_r, unused_m;
  logic [7:0]  load_data;
  logic [3:0]  dbg_reg_num;
  logic [31:0] cycles, cycles2;
  stat_e       stat, final_stat, stat2, final_stat2;

  // model state
  logic [63:0] mregs [16];
  logic [7:0]  mmem  [MB];
  logic [7:0]  imem  [MB];   // memory image before the run
  logic [7:0]  prog  [$];
  logic [63:0] trace [$];
  int n_rr, n_ir, n_mr, n_rm;

  mov_cpu #(.MEM_BYTES(MB)) dut (.clk, .rst, .load_en, .load_addr, .load_data,
    .pc, .stat, .halted, .final_stat, .cycles, .dbg_reg_num, .dbg_reg_val,
    .dbg_mem_addr, .dbg_mem_val);

  mov_cpu #(.MEM_BYTES(MB), .HAS_RMMOVQ(1'b0)) dut_m2r (.clk, .rst, .load_en, .load_addr,
    .load_data, .pc(pc2), .stat(stat2), .halted(halted2), .final_stat(final_stat2),
    .cycles(cycles2), .dbg_reg_num(4'h0), .dbg_reg_val(unused_r),
    .dbg_mem_addr(64'h0), .dbg_mem_val(unused_m));

  always #50 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [63:0] got, input logic [63:0] e);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s = %h, expected %h", what, got, e); end
  endtask

  function automatic logic [63:0] m_rd8(input logic [63:0] a);
    logic [63:0] v;
    for (int i = 0; i < 8; i++) v[8*i +: 8] = mmem[10'(a + 64'(i))];
    return v;
  endfunction

  // emit an instruction into prog and execute it on the model
  task automatic emit(input icode_e ic, input logic [3:0] ra, input logic [3:0] rb,
                      input logic [63:0] c);
    logic [63:0] a;
    trace.push_back(64'(prog.size()));
    prog.push_back({ic, 4'h0});
    if (ic != I_HALT) prog.push_back({ra, rb});
    if (ic == I_IRMOVQ || ic == I_MRMOVQ || ic == I_RMMOVQ)
      for (int i = 0; i < 8; i++) prog.push_back(c[8*i +: 8]);
    case (ic)
      I_RRMOVQ: begin if (rb != 4'hF) mregs[rb] = mregs[ra]; n_rr++; end
      I_IRMOVQ: begin if (rb != 4'hF) mregs[rb] = c; n_ir++; end
      I_MRMOVQ: begin a = c + mregs[rb]; if (ra != 4'hF) mregs[ra] = m_rd8(a); n_mr++; end
      I_RMMOVQ: begin
        a = c + mregs[rb];
        for (int i = 0; i < 8; i++) mmem[10'(a + 64'(i))] = mregs[ra][8*i +: 8];
        n_rm++;
      end
      default: ;
    endcase
  endtask

  // address D so that D + value(rB) lands in the data area
  function automatic logic [63:0] disp_for(input logic [3:0] rb);
    logic [63:0] target;
    target = 64'(DATA_LO) + 64'($urandom % 32'(MB - DATA_LO - 8));
    return target - mregs[rb];
  endfunction

  task automatic start_program();
    prog = {}; trace = {};
    for (int r = 0; r < 16; r++) mregs[r] = '0;
    for (int i = 0; i < MB; i++) begin
      mmem[i] = (i >= DATA_LO) ? 8'($urandom) : 8'h00;
      imem[i] = mmem[i];
    end
  endtask

  task automatic load_and_run(input stat_e stop_stat);
    rst = 1;
    for (int i = 0; i < MB; i++) begin
      @(negedge clk);
      load_en = 1; load_addr = 64'(i);
      load_data = (i < prog.size()) ? prog[i] : imem[i];
    end
    // the program bytes are memory too
    for (int i = 0; i < prog.size(); i++) mmem[i] = prog[i];
    @(negedge clk);
    load_en = 0;
    @(negedge clk);
    rst = 0;
    for (int c = 0; c < trace.size(); c++) begin
      expect_eq("pc", pc, trace[c]);
      expect_eq("stat", 64'(stat), 64'((c == trace.size() - 1) ? stop_stat : STAT_AOK));
      @(negedge clk);
    end
    @(negedge clk);
    expect_eq("halted", 64'(halted), 64'h1);
    expect_eq("pc frozen", pc, trace[trace.size() - 1]);
    expect_eq("cycles run", 64'(cycles), 64'(trace.size()));
    expect_eq("final stat", 64'(final_stat), 64'(stop_stat));
    for (int r = 0; r < 16; r++) begin
      dbg_reg_num = 4'(r);
      #1;
      expect_eq($sformatf("r%0d", r), dbg_reg_val, mregs[r]);
    end
    for (int a = 0; a < MB; a += 8) begin
      dbg_mem_addr = 64'(a);
      #1;
      expect_eq($sformatf("mem[%0h]", a), dbg_mem_val, m_rd8(64'(a)));
    end
  endtask

  initial begin
    load_en = 0; load_addr = '0; load_data = '0; dbg_reg_num = '0; dbg_mem_addr = '0;
    n_rr = 0; n_ir = 0; n_mr = 0; n_rm = 0;
    // directed: irmovq $0x300, %rbx; irmovq $0x1122334455667788, %rax;
    // rmmovq %rax, 8(%rbx); mrmovq 8(%rbx), %rcx; rrmovq %rcx, %rdx;
    // irmovq $5, none (ignored); mrmovq -8(%rbx), %r14; halt
    start_program();
    emit(I_IRMOVQ, 4'hF, 4'h3, 64'h300);
    emit(I_IRMOVQ, 4'hF, 4'h0, 64'h1122334455667788);
    emit(I_RMMOVQ, 4'h0, 4'h3, 64'h8);
    emit(I_MRMOVQ, 4'h1, 4'h3, 64'h8);
    emit(I_RRMOVQ, 4'h1, 4'h2, 64'h0);
    emit(I_IRMOVQ, 4'hF, 4'hF, 64'h5);
    emit(I_MRMOVQ, 4'hE, 4'h3, -64'sd8);
    emit(I_HALT, 4'h0, 4'h0, 64'h0);
    load_and_run(STAT_HLT);
    expect_eq("rdx after directed", mregs[2], 64'h1122334455667788);
    // the mov-to-register CPU stops at the rmmovq (third instruction)
    expect_eq("m2r halted", 64'(halted2), 64'h1);
    expect_eq("m2r stat", 64'(final_stat2), 64'(STAT_INS));
    expect_eq("m2r pc", pc2, 64'd20);
    expect_eq("m2r cycles", 64'(cycles2), 64'd3);
    // random programs
    for (int run = 0; run < 8; run++) begin
      int n;
      start_program();
      n = 10 + ($urandom % 30);
      for (int i = 0; i < n; i++) begin
        logic [3:0] ra, rb;
        int k;
        ra = ($urandom % 8 == 0) ? 4'hF : 4'($urandom % 15);
        rb = ($urandom % 8 == 0) ? 4'hF : 4'($urandom % 15);
        k = (i < 4) ? 1 : int'($urandom % 4);
        case (k)
          0: emit(I_RRMOVQ, ra, rb, 64'h0);
          1: emit(I_IRMOVQ, 4'hF, rb, {$urandom, $urandom});
          2: emit(I_MRMOVQ, ra, rb, disp_for(rb));
          default: emit(I_RMMOVQ, ra, rb, disp_for(rb));
        endcase
      end
      if (run == 7) emit(icode_e'(4'hC), 4'h0, 4'h0, 64'h0);
      else          emit(I_HALT, 4'h0, 4'h0, 64'h0);
      load_and_run((run == 7) ? STAT_INS : STAT_HLT);
    end
    checks++;
    if (n_rr == 0 || n_ir == 0 || n_mr == 0 || n_rm == 0) begin
      failures++;
      $display("FAIL instruction mix rr=%0d ir=%0d mr=%0d rm=%0d", n_rr, n_ir, n_mr, n_rm);
    end
    $display("instructions run: rrmovq=%0d irmovq=%0d mrmovq=%0d rmmovq=%0d", n_rr, n_ir, n_mr, n_rm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
