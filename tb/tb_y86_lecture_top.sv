// tb_y86_lecture_top: end-to-end run of all six CPUs in the top at their
// default sizes. Phase 1 runs, at the same time,
//   nop CPU      five nops, PC must equal the cycles since reset
//   nop/halt     five nops and halt: 6 cycles, stop at 0x5 with HLT
//   nop/jmp      nopjmp.yo: PCs 0 1 13 a 1c 1d 1e, 7 cycles, HLT
//   addq         the worked example: rdx 30 -> 40 -> 60, PC 0 -> 2 -> 4
//   mov          every mov instruction, a write to register 15 that must be
//                ignored, and a store that overwrites the next instruction
//                with a halt (one memory for code and data)
//   SEQ          a call to a loop that sums 3 + 2 + 1, pushq/popq, a taken
//                and a not-taken cmov, ret, a store: 22 cycles, rax = 6
// Phase 2 resets and runs an invalid opcode on the nop/halt CPU (INS) and
// a load from outside memory on the SEQ CPU (ADR).
// Each mechanism is counted and one that never happened is a failure.
module tb_y86_lecture_top;
  import y86_pkg::*;
  localparam int MB = 1024;
  int checks = 0, failures = 0;

  logic clk = 0, rst;
  logic        nop_load_en, nh_load_en, nj_load_en, addq_load_en, mov_load_en;
  logic [63:0] nop_load_addr, nh_load_addr, nj_load_addr, addq_load_addr, mov_load_addr;
  logic [7:0]  nop_load_data, nh_load_data, nj_load_data, addq_load_data, mov_load_data;
  logic [63:0] nop_pc, nh_pc, nj_pc, addq_pc, mov_pc;
  logic [79:0] nop_i10bytes, nj_i10bytes;
  stat_e       nop_stat, nh_stat, nh_final_stat, nj_stat, nj_final_stat, addq_stat,
               mov_stat, mov_final_stat;
  logic        nh_halted, nj_halted, mov_halted;
  logic [31:0] nh_cycles, nj_cycles, mov_cycles;
  logic        addq_init_en;
  logic [3:0]  addq_init_reg, addq_dbg_reg_num, mov_dbg_reg_num;
  logic [63:0] addq_init_val, addq_dbg_reg_val, mov_dbg_reg_val, mov_dbg_mem_addr, mov_dbg_mem_val;
  logic        seq_load_en, seq_halted;
  logic [63:0] seq_load_addr, seq_pc, seq_dbg_reg_val, seq_dbg_mem_addr, seq_dbg_mem_val;
  logic [7:0]  seq_load_data;
  stat_e       seq_stat, seq_final_stat;
  logic [31:0] seq_cycles;
  logic [2:0]  seq_cc;
  logic [3:0]  seq_dbg_reg_num;

  y86_lecture_top dut (.*);

  always #50 clk = ~clk;

  // mechanism counters
  int cnt_pc_plus1, cnt_jump, cnt_halt_stop, cnt_ins_stop, cnt_addq;
  int cnt_rr, cnt_ir, cnt_mr, cnt_rm, cnt_reg15_write, cnt_store_to_code;
  int cnt_call, cnt_ret, cnt_push, cnt_pop, cnt_opq, cnt_jcc_taken, cnt_jcc_not,
      cnt_cmov_taken, cnt_cmov_not, cnt_adr_stop;

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

  // count what happens in each clock cycle of the running CPUs
  logic [63:0] nj_pc_q, nop_pc_q;
  always @(posedge clk) begin
    if (!rst) begin
      if (nop_pc == nop_pc_q + 64'd1) cnt_pc_plus1++;
      if (!nj_halted && nj_stat == STAT_AOK && nj_i10bytes[7:4] == 4'h7) cnt_jump++;
      if (!nh_halted && nh_stat == STAT_HLT) cnt_halt_stop++;
      if (!nj_halted && nj_stat == STAT_HLT) cnt_halt_stop++;
      if (!mov_halted && mov_stat == STAT_HLT) cnt_halt_stop++;
      if (!nh_halted && nh_stat == STAT_INS) cnt_ins_stop++;
      if (!seq_halted && seq_stat == STAT_ADR) cnt_adr_stop++;
      if (!seq_halted && seq_stat == STAT_AOK) begin
        case (dut.u_seq.icode)
          I_CALL:   cnt_call++;
          I_RET:    cnt_ret++;
          I_PUSHQ:  cnt_push++;
          I_POPQ:   cnt_pop++;
          I_OPQ:    cnt_opq++;
          I_JXX:    if (dut.u_seq.cnd) cnt_jcc_taken++; else cnt_jcc_not++;
          I_RRMOVQ: if (dut.u_seq.cnd) cnt_cmov_taken++; else cnt_cmov_not++;
          default: ;
        endcase
      end
      if (!mov_halted && mov_stat == STAT_AOK) begin
        case (dut.u_mov.icode)
          I_RRMOVQ: cnt_rr++;
          I_IRMOVQ: cnt_ir++;
          I_MRMOVQ: cnt_mr++;
          I_RMMOVQ: cnt_rm++;
          default: ;
        endcase
        if (dut.u_mov.dstE == REG_NONE && dut.u_mov.icode inside {I_RRMOVQ, I_IRMOVQ, I_MRMOVQ})
          cnt_reg15_write++;
      end
    end
    nop_pc_q <= nop_pc;
    nj_pc_q  <= nj_pc;
  end

  logic [7:0] p_nop [$], p_nh [$], p_nj [$], p_addq [$], p_mov [$], p_seq [$];

  task automatic push_q(ref logic [7:0] q [$], input logic [63:0] v, input int n);
    for (int i = 0; i < n; i++) q.push_back(v[8*i +: 8]);
  endtask

  task automatic load_all();
    rst = 1;
    for (int i = 0; i < MB; i++) begin
      @(negedge clk);
      {nop_load_en, nh_load_en, nj_load_en, addq_load_en, mov_load_en, seq_load_en} = '1;
      nop_load_addr = 64'(i); nh_load_addr = 64'(i); nj_load_addr = 64'(i);
      addq_load_addr = 64'(i); mov_load_addr = 64'(i); seq_load_addr = 64'(i);
      seq_load_data  = (i < p_seq.size())  ? p_seq[i]  : 8'h00;
      nop_load_data  = (i < p_nop.size())  ? p_nop[i]  : 8'h00;
      nh_load_data   = (i < p_nh.size())   ? p_nh[i]   : 8'h00;
      nj_load_data   = (i < p_nj.size())   ? p_nj[i]   : 8'h00;
      addq_load_data = (i < p_addq.size()) ? p_addq[i] : 8'h00;
      mov_load_data  = (i < p_mov.size())  ? p_mov[i]  : 8'h00;
    end
    @(negedge clk);
    {nop_load_en, nh_load_en, nj_load_en, addq_load_en, mov_load_en, seq_load_en} = '0;
  endtask

  initial begin
    static logic [63:0] nj_trace [7] = '{64'h0, 64'h1, 64'h13, 64'ha, 64'h1c, 64'h1d, 64'h1e};
    {nop_load_en, nh_load_en, nj_load_en, addq_load_en, mov_load_en, seq_load_en} = '0;
    seq_load_addr = '0; seq_load_data = '0; seq_dbg_reg_num = '0; seq_dbg_mem_addr = '0;
    cnt_call = 0; cnt_ret = 0; cnt_push = 0; cnt_pop = 0; cnt_opq = 0; cnt_jcc_taken = 0;
    cnt_jcc_not = 0; cnt_cmov_taken = 0; cnt_cmov_not = 0; cnt_adr_stop = 0;
    nop_load_addr = '0; nh_load_addr = '0; nj_load_addr = '0; addq_load_addr = '0; mov_load_addr = '0;
    nop_load_data = '0; nh_load_data = '0; nj_load_data = '0; addq_load_data = '0; mov_load_data = '0;
    addq_init_en = 0; addq_init_reg = 4'hF; addq_init_val = '0; addq_dbg_reg_num = '0;
    mov_dbg_reg_num = '0; mov_dbg_mem_addr = '0;
    cnt_pc_plus1 = 0; cnt_jump = 0; cnt_halt_stop = 0; cnt_ins_stop = 0; cnt_addq = 0;
    cnt_rr = 0; cnt_ir = 0; cnt_mr = 0; cnt_rm = 0; cnt_reg15_write = 0; cnt_store_to_code = 0;

    // ---------------- programs ----------------
    p_nop = '{8'h10, 8'h10, 8'h10, 8'h10, 8'h10};
    p_nh  = '{8'h10, 8'h10, 8'h10, 8'h10, 8'h10, 8'h00};
    p_nj  = '{8'h10,
              8'h70, 8'h13, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
              8'h70, 8'h1c, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
              8'h70, 8'h0a, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
              8'h10, 8'h10, 8'h00};
    p_addq = '{8'h60, 8'h02, 8'h60, 8'h32};
    // mov program
    //  0x00 irmovq $0x300, %rbx
    //  0x0a irmovq $0x1122334455667788, %rax
    //  0x14 rmmovq %rax, 8(%rbx)
    //  0x1e mrmovq 8(%rbx), %rcx
    //  0x28 rrmovq %rcx, %rdx
    //  0x2a irmovq $7, none              (write to register 15: ignored)
    //  0x34 rmmovq %rsi, 0x48(none)      (rsi = 0: writes eight 00 bytes at 0x48)
    //  0x3e irmovq $5, %r8
    //  0x48 irmovq $0x99, %rdi           (overwritten by the store: becomes halt)
    //  0x52 halt                         (not reached)
    p_mov = {};
    p_mov.push_back(8'h30); p_mov.push_back(8'hF3); push_q(p_mov, 64'h300, 8);
    p_mov.push_back(8'h30); p_mov.push_back(8'hF0); push_q(p_mov, 64'h1122334455667788, 8);
    p_mov.push_back(8'h40); p_mov.push_back(8'h03); push_q(p_mov, 64'h8, 8);
    p_mov.push_back(8'h50); p_mov.push_back(8'h13); push_q(p_mov, 64'h8, 8);
    p_mov.push_back(8'h20); p_mov.push_back(8'h12);
    p_mov.push_back(8'h30); p_mov.push_back(8'hFF); push_q(p_mov, 64'h7, 8);
    p_mov.push_back(8'h40); p_mov.push_back(8'h6F); push_q(p_mov, 64'h48, 8);
    p_mov.push_back(8'h30); p_mov.push_back(8'hF8); push_q(p_mov, 64'h5, 8);
    p_mov.push_back(8'h30); p_mov.push_back(8'hF7); push_q(p_mov, 64'h99, 8);
    p_mov.push_back(8'h00);

    // SEQ program
    //  0x00 irmovq $0x3f0, %rsp
    //  0x0a irmovq $3, %rsi
    //  0x14 irmovq $1, %r9
    //  0x1e call 0x40
    //  0x27 rmmovq %rax, 0x300(none)
    //  0x31 irmovq $5, %rbx
    //  0x3b halt
    //  0x40 xorq %rax, %rax
    //  0x42 addq %rsi, %rax         (loop)
    //  0x44 subq %r9, %rsi
    //  0x46 jne 0x42
    //  0x4f pushq %rax
    //  0x51 popq %rcx
    //  0x53 cmove %rcx, %rdx        (taken: ZF set by the last subq)
    //  0x55 cmovne %rcx, %rdi       (not taken)
    //  0x57 ret
    p_seq = {};
    p_seq.push_back(8'h30); p_seq.push_back(8'hF4); push_q(p_seq, 64'h3f0, 8);
    p_seq.push_back(8'h30); p_seq.push_back(8'hF6); push_q(p_seq, 64'h3, 8);
    p_seq.push_back(8'h30); p_seq.push_back(8'hF9); push_q(p_seq, 64'h1, 8);
    p_seq.push_back(8'h80); push_q(p_seq, 64'h40, 8);
    p_seq.push_back(8'h40); p_seq.push_back(8'h0F); push_q(p_seq, 64'h300, 8);
    p_seq.push_back(8'h30); p_seq.push_back(8'hF3); push_q(p_seq, 64'h5, 8);
    p_seq.push_back(8'h00);
    while (p_seq.size() < 'h40) p_seq.push_back(8'h00);
    p_seq.push_back(8'h63); p_seq.push_back(8'h00);
    p_seq.push_back(8'h60); p_seq.push_back(8'h60);
    p_seq.push_back(8'h61); p_seq.push_back(8'h96);
    p_seq.push_back(8'h74); push_q(p_seq, 64'h42, 8);
    p_seq.push_back(8'hA0); p_seq.push_back(8'h0F);
    p_seq.push_back(8'hB0); p_seq.push_back(8'h1F);
    p_seq.push_back(8'h23); p_seq.push_back(8'h12);
    p_seq.push_back(8'h24); p_seq.push_back(8'h17);
    p_seq.push_back(8'h90);

    // ---------------- phase 1 ----------------
    load_all();
    expect_eq("nj i10bytes@0", nj_i10bytes[63:0], 64'h137010);
    expect_eq("mov program ends before 0x60", 64'(p_mov.size() < 'h60), 64'h1);
    @(negedge clk);
    rst = 0;
    // addq: preset rax, rbx, rdx (its PC is held meanwhile)
    addq_init_en = 1; addq_init_reg = 4'h0; addq_init_val = 64'd10;
    for (int c = 0; c < 60; c++) begin
      // the nop/jmp CPU follows the trace from nopjmp.yo
      if (c < 7) expect_eq($sformatf("nj pc cycle %0d", c), nj_pc, nj_trace[c]);
      if (c < 6) expect_eq($sformatf("nh pc cycle %0d", c), nh_pc, 64'(c));
      expect_eq("nop pc", nop_pc, 64'(c));
      expect_eq("nop stat", 64'(nop_stat), 64'(STAT_AOK));
      if (c == 1) begin
        addq_init_reg = 4'h3; addq_init_val = 64'd20;
      end else if (c == 2) begin
        addq_init_reg = 4'h2; addq_init_val = 64'd30;
      end else if (c == 3) begin
        addq_init_en = 0; addq_init_reg = 4'hF;
        expect_eq("addq pc initially", addq_pc, 64'h0);
        addq_dbg_reg_num = 4'h2;
        #1 expect_eq("rdx initially", addq_dbg_reg_val, 64'd30);
      end else if (c == 4 || c == 5) begin
        addq_dbg_reg_num = 4'h2;
        #1;
        expect_eq("addq pc", addq_pc, (c == 4) ? 64'h2 : 64'h4);
        expect_eq("addq rdx", addq_dbg_reg_val, (c == 4) ? 64'd40 : 64'd60);
        expect_eq("addq stat", 64'(addq_stat), 64'(STAT_AOK));
        cnt_addq++;
      end
      @(negedge clk);
    end
    // final states
    expect_eq("nh halted", 64'(nh_halted), 64'h1);
    expect_eq("nh pc", nh_pc, 64'h5);
    expect_eq("nh cycles", 64'(nh_cycles), 64'd6);
    expect_eq("nh stat", 64'(nh_final_stat), 64'(STAT_HLT));
    expect_eq("nj halted", 64'(nj_halted), 64'h1);
    expect_eq("nj pc", nj_pc, 64'h1e);
    expect_eq("nj cycles", 64'(nj_cycles), 64'd7);
    expect_eq("nj stat", 64'(nj_final_stat), 64'(STAT_HLT));
    expect_eq("mov halted", 64'(mov_halted), 64'h1);
    expect_eq("mov final stat", 64'(mov_final_stat), 64'(STAT_HLT));
    expect_eq("mov pc (halt written by the store)", mov_pc, 64'h48);
    expect_eq("mov cycles", 64'(mov_cycles), 64'd9);
    begin
      logic [63:0] exp_regs [16];
      for (int r = 0; r < 16; r++) exp_regs[r] = '0;
      exp_regs[0] = 64'h1122334455667788; exp_regs[1] = 64'h1122334455667788;
      exp_regs[2] = 64'h1122334455667788; exp_regs[3] = 64'h300; exp_regs[8] = 64'h5;
      for (int r = 0; r < 16; r++) begin
        mov_dbg_reg_num = 4'(r);
        #1 expect_eq($sformatf("mov r%0d", r), mov_dbg_reg_val, exp_regs[r]);
      end
    end
    mov_dbg_mem_addr = 64'h308;
    #1 expect_eq("mov mem[0x308]", mov_dbg_mem_val, 64'h1122334455667788);
    mov_dbg_mem_addr = 64'h48;
    #1 expect_eq("mov code at 0x48 overwritten", mov_dbg_mem_val, 64'h0);
    if (mov_pc == 64'h48 && mov_final_stat == STAT_HLT) cnt_store_to_code++;
    expect_eq("seq halted", 64'(seq_halted), 64'h1);
    expect_eq("seq final stat", 64'(seq_final_stat), 64'(STAT_HLT));
    expect_eq("seq pc", seq_pc, 64'h3b);
    expect_eq("seq cycles", 64'(seq_cycles), 64'd22);
    expect_eq("seq cc (Z=1 S=0 O=0)", 64'(seq_cc), 64'b100);
    begin
      logic [63:0] exp_regs [16];
      for (int r = 0; r < 16; r++) exp_regs[r] = '0;
      exp_regs[0] = 64'd6; exp_regs[1] = 64'd6; exp_regs[2] = 64'd6; exp_regs[3] = 64'd5;
      exp_regs[4] = 64'h3f0; exp_regs[9] = 64'd1;
      for (int r = 0; r < 16; r++) begin
        seq_dbg_reg_num = 4'(r);
        #1 expect_eq($sformatf("seq r%0d", r), seq_dbg_reg_val, exp_regs[r]);
      end
    end
    seq_dbg_mem_addr = 64'h300;
    #1 expect_eq("seq mem[0x300]", seq_dbg_mem_val, 64'd6);
    seq_dbg_mem_addr = 64'h3e8;
    #1 expect_eq("seq return address on stack", seq_dbg_mem_val, 64'h27);
    seq_dbg_mem_addr = 64'h3e0;
    #1 expect_eq("seq pushed rax", seq_dbg_mem_val, 64'd6);

    // ---------------- phase 2: invalid opcode ----------------
    p_nh = '{8'h10, 8'h10, 8'hF0};
    p_seq = {};
    p_seq.push_back(8'h10);
    p_seq.push_back(8'h50); p_seq.push_back(8'h0F); push_q(p_seq, 64'h1000, 8);
    load_all();
    @(negedge clk);
    rst = 0;
    repeat (6) @(negedge clk);
    expect_eq("nh INS pc", nh_pc, 64'h2);
    expect_eq("nh INS stat", 64'(nh_final_stat), 64'(STAT_INS));
    expect_eq("nh INS cycles", 64'(nh_cycles), 64'd3);
    expect_eq("seq ADR pc", seq_pc, 64'h1);
    expect_eq("seq ADR stat", 64'(seq_final_stat), 64'(STAT_ADR));
    expect_eq("seq ADR cycles", 64'(seq_cycles), 64'd2);

    // ---------------- mechanism coverage ----------------
    $display("mechanisms: pc+1=%0d jump=%0d halt=%0d ins=%0d addq=%0d rrmovq=%0d irmovq=%0d mrmovq=%0d rmmovq=%0d reg15_write=%0d store_to_code=%0d",
             cnt_pc_plus1, cnt_jump, cnt_halt_stop, cnt_ins_stop, cnt_addq, cnt_rr, cnt_ir,
             cnt_mr, cnt_rm, cnt_reg15_write, cnt_store_to_code);
    $display("seq mechanisms: call=%0d ret=%0d pushq=%0d popq=%0d OPq=%0d jXX taken=%0d jXX not taken=%0d cmov taken=%0d cmov not taken=%0d adr=%0d",
             cnt_call, cnt_ret, cnt_push, cnt_pop, cnt_opq, cnt_jcc_taken, cnt_jcc_not,
             cnt_cmov_taken, cnt_cmov_not, cnt_adr_stop);
    begin
      int cs [21];
      cs = '{cnt_pc_plus1, cnt_jump, cnt_halt_stop, cnt_ins_stop, cnt_addq, cnt_rr,
             cnt_ir, cnt_mr, cnt_rm, cnt_reg15_write, cnt_store_to_code,
             cnt_call, cnt_ret, cnt_push, cnt_pop, cnt_opq, cnt_jcc_taken, cnt_jcc_not,
             cnt_cmov_taken, cnt_cmov_not, cnt_adr_stop};
      for (int i = 0; i < 21; i++) begin
        checks++;
        if (cs[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
