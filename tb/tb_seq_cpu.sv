// tb_seq_cpu: checks the full-instruction-set CPU against an
// instruction-level Y86-64 interpreter written here. Every cycle the PC and
// Stat are compared with the interpreter; at the end the registers,
// condition codes, cycle count and the whole memory. Programs:
//   - a directed program that calls a subroutine summing an array in a
//     loop (call, ret, pushq, popq, jXX, OPq, mrmovq, rmmovq, cmovXX)
//   - popq %rsp, pushq %rsp, an out-of-range access (ADR), bad function
//     codes (INS), an unknown opcode (INS)
//   - random programs of every instruction but call/ret, with forward
//     jumps over nops, whose memory addresses are kept in range
// Timing: the image (1 KiB, data area random) is written through the
// loader port, one byte per clock with reset held, then reset is dropped.
// The CPU runs one instruction per rising edge; the testbench samples and
// compares on the falling edge, stepping the interpreter once per cycle.
// Registers and memory are read through the dbg_* ports after the stop.
// The interpreter is the reference: popq %rsp leaves the popped value,
// pushq %rsp stores the old %rsp, and a stopping instruction changes
// nothing, as the CPU is meant to do.
module tb_seq_cpu;
  import y86_pkg::*;
  localparam int MB = 1024;
  localparam int DATA_LO = 'h200;
  localparam int STACK_TOP = 'h3f0;
  int checks = 0, failures = 0;
  logic        clk = 0, rst, load_en, halted;
  logic [63:0] load_addr, pc, dbg_reg_val, dbg_mem_addr, dbg_mem_val;
  logic [7:0]  load_data;
  logic [3:0]  dbg_reg_num;
  logic [31:0] cycles;
  logic [2:0]  cc;
  stat_e       stat, final_stat;

  seq_cpu #(.MEM_BYTES(MB)) dut (.clk, .rst, .load_en, .load_addr, .load_data,
    .pc, .stat, .halted, .final_stat, .cycles, .cc, .dbg_reg_num, .dbg_reg_val,
    .dbg_mem_addr, .dbg_mem_val);

  always #50 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [63:0] got, input logic [63:0] e);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s = %h, expected %h", what, got, e); end
  endtask

  // ---------------- interpreter ----------------
  logic [63:0] r  [16];
  logic [7:0]  m  [MB];
  logic [7:0]  m0 [MB];        // image to load
  logic [63:0] ipc;
  logic        zf, sf, of;
  stat_e       ist;
  int          icount [16];

  function automatic logic [63:0] rd8(input logic [63:0] a);
    logic [63:0] v;
    for (int i = 0; i < 8; i++) v[8*i +: 8] = m[10'(a + 64'(i))];
    return v;
  endfunction

  task automatic wr8(input logic [63:0] a, input logic [63:0] v);
    for (int i = 0; i < 8; i++) m[10'(a + 64'(i))] = v[8*i +: 8];
  endtask

  function automatic logic bad(input logic [63:0] a);
    return a > 64'(MB - 8);
  endfunction

  function automatic logic cond(input logic [3:0] f);
    case (f)
      0: return 1'b1;
      1: return (sf ^ of) | zf;
      2: return sf ^ of;
      3: return zf;
      4: return !zf;
      5: return !(sf ^ of);
      6: return !(sf ^ of) && !zf;
      default: return 1'b0;
    endcase
  endfunction

  function automatic logic [7:0] fb(input logic [63:0] a);
    return (a < 64'(MB)) ? m[a[9:0]] : 8'h00;
  endfunction

  function automatic logic [63:0] imm(input logic [63:0] a);
    logic [63:0] v;
    for (int i = 0; i < 8; i++) v[8*i +: 8] = fb(a + 64'(i));
    return v;
  endfunction

  // execute one instruction at ipc; sets ist, leaves state alone unless AOK
  task automatic step();
    logic [3:0] ic, fn, ra, rb;
    logic [63:0] c, d, a, v, t, x, y;
    if (ipc >= 64'(MB)) begin ist = STAT_ADR; return; end
    ic = fb(ipc)[7:4]; fn = fb(ipc)[3:0];
    ra = fb(ipc + 1)[7:4]; rb = fb(ipc + 1)[3:0];
    c = imm(ipc + 2); d = imm(ipc + 1);
    ist = STAT_AOK;
    case (ic)
      4'h0: ist = STAT_HLT;
      4'h1: ipc = ipc + 1;
      4'h2: if (fn > 6) ist = STAT_INS;
            else begin if (cond(fn) && rb != 4'hF) r[rb] = r[ra]; ipc = ipc + 2; end
      4'h3: begin if (rb != 4'hF) r[rb] = c; ipc = ipc + 10; end
      4'h4: begin a = c + r[rb]; if (bad(a)) ist = STAT_ADR; else begin wr8(a, r[ra]); ipc = ipc + 10; end end
      4'h5: begin a = c + r[rb]; if (bad(a)) ist = STAT_ADR;
                  else begin v = rd8(a); if (ra != 4'hF) r[ra] = v; ipc = ipc + 10; end end
      4'h6: if (fn > 3) ist = STAT_INS;
            else begin
              x = r[ra]; y = r[rb];
              case (fn)
                0: begin t = y + x; of = (x[63] == y[63]) && (t[63] != y[63]); end
                1: begin t = y - x; of = (x[63] != y[63]) && (t[63] != y[63]); end
                2: begin t = y & x; of = 0; end
                default: begin t = y ^ x; of = 0; end
              endcase
              zf = (t == 0); sf = t[63];
              if (rb != 4'hF) r[rb] = t;
              ipc = ipc + 2;
            end
      4'h7: if (fn > 6) ist = STAT_INS; else ipc = cond(fn) ? d : ipc + 9;
      4'h8: begin a = r[4] - 8; if (bad(a)) ist = STAT_ADR;
                  else begin wr8(a, ipc + 9); r[4] = a; ipc = d; end end
      4'h9: begin a = r[4]; if (bad(a)) ist = STAT_ADR;
                  else begin ipc = rd8(a); r[4] = a + 8; end end
      4'hA: begin v = r[ra]; a = r[4] - 8; if (bad(a)) ist = STAT_ADR;
                  else begin wr8(a, v); r[4] = a; ipc = ipc + 2; end end
      4'hB: begin a = r[4]; if (bad(a)) ist = STAT_ADR;
                  else begin v = rd8(a); r[4] = a + 8; if (ra != 4'hF) r[ra] = v; ipc = ipc + 2; end end
      default: ist = STAT_INS;
    endcase
    if (ist == STAT_AOK) icount[ic]++;
  endtask

  task automatic model_reset();
    for (int i = 0; i < 16; i++) r[i] = '0;
    for (int i = 0; i < MB; i++) m[i] = m0[i];
    ipc = 0; zf = 1; sf = 0; of = 0;
  endtask

  // ---------------- program building ----------------
  logic [63:0] ap;   // assembly pointer
  task automatic b(input logic [7:0] v); m0[ap[9:0]] = v; m[ap[9:0]] = v; ap++; endtask
  task automatic q(input logic [63:0] v); for (int i = 0; i < 8; i++) b(v[8*i +: 8]); endtask
  task automatic i_rr(input logic [3:0] f, input logic [3:0] ra, input logic [3:0] rb); b({4'h2, f}); b({ra, rb}); endtask
  task automatic i_ir(input logic [63:0] v, input logic [3:0] rb); b(8'h30); b({4'hF, rb}); q(v); endtask
  task automatic i_rm(input logic [3:0] ra, input logic [63:0] dd, input logic [3:0] rb); b(8'h40); b({ra, rb}); q(dd); endtask
  task automatic i_mr(input logic [63:0] dd, input logic [3:0] rb, input logic [3:0] ra); b(8'h50); b({ra, rb}); q(dd); endtask
  task automatic i_op(input logic [3:0] f, input logic [3:0] ra, input logic [3:0] rb); b({4'h6, f}); b({ra, rb}); endtask
  task automatic i_j(input logic [3:0] f, input logic [63:0] dd); b({4'h7, f}); q(dd); endtask
  task automatic i_call(input logic [63:0] dd); b(8'h80); q(dd); endtask
  task automatic i_ret(); b(8'h90); endtask
  task automatic i_push(input logic [3:0] ra); b(8'hA0); b({ra, 4'hF}); endtask
  task automatic i_pop(input logic [3:0] ra); b(8'hB0); b({ra, 4'hF}); endtask
  task automatic i_halt(); b(8'h00); endtask

  task automatic clear_image();
    for (int i = 0; i < MB; i++) m0[i] = (i >= DATA_LO) ? 8'($urandom) : 8'h00;
    ap = 0;
  endtask

  // ---------------- run one program on DUT and model ----------------
  task automatic run_and_compare(input string name);
    int n;
    rst = 1;
    for (int i = 0; i < MB; i++) begin
      @(negedge clk);
      load_en = 1; load_addr = 64'(i); load_data = m0[i];
    end
    @(negedge clk);
    load_en = 0;
    model_reset();
    @(negedge clk);
    rst = 0;
    n = 0;
    forever begin
      expect_eq({name, " pc"}, pc, ipc);
      step();
      n++;
      expect_eq({name, " stat"}, 64'(stat), 64'(ist));
      @(negedge clk);
      if (ist != STAT_AOK || n > 2000) break;
    end
    @(negedge clk);
    expect_eq({name, " halted"}, 64'(halted), 64'h1);
    expect_eq({name, " cycles"}, 64'(cycles), 64'(n));
    expect_eq({name, " final stat"}, 64'(final_stat), 64'(ist));
    expect_eq({name, " cc"}, 64'(cc), 64'({zf, sf, of}));
    for (int i = 0; i < 16; i++) begin
      dbg_reg_num = 4'(i);
      #1 expect_eq($sformatf("%s r%0d", name, i), dbg_reg_val, r[i]);
    end
    for (int a = 0; a < MB; a += 8) begin
      dbg_mem_addr = 64'(a);
      #1 expect_eq($sformatf("%s mem[%0h]", name, a), dbg_mem_val, rd8(64'(a)));
    end
  endtask

  // random straight-line program with forward jumps; the interpreter runs
  // alongside generation so addresses can be aimed at the data area
  task automatic random_program(input int len);
    int depth;
    clear_image();
    model_reset();
    depth = 0;
    i_ir(64'(STACK_TOP), 4'h4); step();
    for (int k = 0; k < len && ap < 64'(DATA_LO - 40); k++) begin
      logic [3:0] ra, rb;
      int kind;
      ra = ($urandom % 9 == 0) ? 4'hF : 4'($urandom % 15);
      rb = ($urandom % 9 == 0) ? 4'hF : 4'($urandom % 15);
      if (rb == 4'h4) rb = 4'h5;
      kind = $urandom % 10;
      case (kind)
        0: i_rr(4'($urandom % 7), ra, rb);
        1: i_ir({$urandom, $urandom}, rb);
        2: i_op(4'($urandom % 4), ra, rb);
        3: i_op(4'($urandom % 4), ra, rb);
        4: begin
             logic [63:0] t;
             t = 64'(DATA_LO) + 64'($urandom % 32'('h300 - DATA_LO));
             i_mr(t - r[ra == 4'hF ? 4'hF : rb], (ra == 4'hF) ? 4'hF : rb, (ra == 4'h4) ? 4'h6 : ra);
           end
        5: begin
             logic [63:0] t;
             t = 64'(DATA_LO) + 64'($urandom % 32'('h300 - DATA_LO));
             i_rm(ra, t - r[rb], rb);
           end
        6: begin
             int skip;
             skip = 1 + $urandom % 3;
             i_j(4'($urandom % 7), ap + 9 + 64'(skip));
             for (int s = 0; s < skip; s++) b(8'h10);
           end
        7: if (depth < 12) begin i_push(ra); depth++; end else b(8'h10);
        8: if (depth > 0) begin i_pop((ra == 4'h4) ? 4'h7 : ra); depth--; end else b(8'h10);
        default: b(8'h10);
      endcase
      // advance the model over what was just emitted (nops included)
      while (ipc < ap) begin step(); if (ist != STAT_AOK) break; end
    end
    i_halt();
  endtask

  initial begin
    load_en = 0; load_addr = '0; load_data = '0; dbg_reg_num = '0; dbg_mem_addr = '0;
    for (int i = 0; i < 16; i++) icount[i] = 0;

    // ---- directed: subroutine summing four quadwords ----
    clear_image();
    for (int i = 0; i < 4; i++) begin
      logic [63:0] v;
      v = 64'(i + 1) * 64'h1111;
      for (int j = 0; j < 8; j++) m0[DATA_LO + 8*i + j] = v[8*j +: 8];
    end
    i_ir(64'(STACK_TOP), 4'h4);            // rsp
    i_ir(64'(DATA_LO), 4'h7);              // rdi = array
    i_ir(64'd4, 4'h6);                     // rsi = count
    i_call(64'h60);
    i_rm(4'h0, 64'h300, 4'hF);             // store the sum at 0x300
    i_rr(4'h1, 4'h0, 4'hB);                // cmovle rax, r11 (taken: the last subq left ZF set)
    i_rr(4'h6, 4'h0, 4'hC);                // cmovg rax, r12
    i_halt();
    ap = 64'h60;                           // sum:
    i_ir(64'd8, 4'h8);
    i_ir(64'd1, 4'h9);
    i_op(4'h3, 4'h0, 4'h0);                // xorq rax, rax
    i_op(4'h2, 4'h6, 4'h6);                // andq rsi, rsi
    i_j(4'h0, 64'h91);                     // jmp test
    // loop at 0x81
    i_mr(64'h0, 4'h7, 4'hA);               // mrmovq (rdi), r10
    i_op(4'h0, 4'hA, 4'h0);                // addq r10, rax
    i_op(4'h0, 4'h8, 4'h7);                // addq r8, rdi
    i_op(4'h1, 4'h9, 4'h6);                // subq r9, rsi
    expect_eq("sum layout", ap, 64'h91);
    // test at 0x91
    i_j(4'h4, 64'h81);                     // jne loop
    i_push(4'h0);
    i_pop(4'h3);                           // rbx = rax
    i_ret();
    run_and_compare("sum");
    expect_eq("sum result", rd8(64'h300), 64'h1111 * 10);

    // ---- pushq %rsp / popq %rsp ----
    clear_image();
    i_ir(64'(STACK_TOP), 4'h4);
    i_push(4'h4);
    i_pop(4'h4);
    i_push(4'h4);
    i_ir(64'h2f0, 4'h1);
    i_rm(4'h1, 64'h0, 4'h4);               // overwrite stacked value
    i_pop(4'h4);                           // rsp <- 0x2f0
    i_halt();
    run_and_compare("push/pop rsp");

    // ---- overflow flags and all conditions ----
    clear_image();
    i_ir(64'h7fff_ffff_ffff_ffff, 4'h0);
    i_ir(64'd1, 4'h1);
    i_op(4'h0, 4'h1, 4'h0);                // positive overflow
    for (int f = 0; f < 7; f++) i_rr(4'(f), 4'h1, 4'(8 + f));
    i_ir(64'h8000_0000_0000_0000, 4'h2);
    i_op(4'h1, 4'h1, 4'h2);                // negative overflow on sub
    for (int f = 0; f < 7; f++) i_rr(4'(f), 4'h2, 4'(8 + f));
    i_halt();
    run_and_compare("flags");

    // ---- ADR on a load outside memory ----
    clear_image();
    i_ir(64'h1000, 4'h3);
    i_mr(64'h0, 4'h3, 4'h0);
    i_halt();
    run_and_compare("adr");

    // ---- INS: bad OPq function, then unknown opcode ----
    clear_image();
    i_op(4'h7, 4'h0, 4'h1);
    run_and_compare("ins fn");
    clear_image();
    b(8'h10); b(8'hE0);
    run_and_compare("ins op");

    // ---- random programs ----
    for (int k = 0; k < 20; k++) begin
      random_program(60);
      run_and_compare($sformatf("random%0d", k));
      expect_eq("random run ends in halt", 64'(final_stat), 64'(STAT_HLT));
    end

    // every instruction executed at least once
    for (int i = 0; i < 12; i++) begin
      checks++;
      if (icount[i] == 0 && i != 0) begin failures++; $display("FAIL icode %0h never executed", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
