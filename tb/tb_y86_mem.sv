// tb_y86_mem: checks the instruction port against the "what is i10bytes?"
// example (bytes 60 12 61 21 00 .. 01 at 0x0a), little-endian data reads
// and writes against a byte model, write-then-fetch through the shared
// array, and reads beyond the end of the memory.
module tb_y86_mem;
  localparam longint unsigned MB = 256;
  int checks = 0, failures = 0;
  logic        clk = 0;
  logic [63:0] pc, daddr, dwdata, drdata, load_addr, dbg_addr, dbg_data;
  logic [79:0] i10bytes;
  logic        dwe, load_en;
  logic [7:0]  load_data;
  logic [7:0]  model [MB];

  y86_mem #(.MEM_BYTES(int'(MB))) dut (.clk, .pc, .i10bytes, .daddr, .dwe, .dwdata, .drdata,
    .load_en, .load_addr, .load_data, .dbg_addr, .dbg_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] mb(input logic [63:0] a);
    return (a < MB) ? model[a[7:0]] : 8'h00;
  endfunction

  task automatic expect_eq(input string what, input logic [79:0] got, input logic [79:0] e);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s = %h, expected %h", what, got, e); end
  endtask

  task automatic load(input logic [63:0] a, input logic [7:0] v);
    @(negedge clk);
    load_en = 1; load_addr = a; load_data = v;
    @(posedge clk); #1;
    load_en = 0;
    if (a < MB) model[a[7:0]] = v;
  endtask

  task automatic check_ports(input logic [63:0] p, input logic [63:0] da);
    logic [79:0] ei;
    logic [63:0] ed;
    pc = p; daddr = da; dbg_addr = da;
    #1;
    for (int i = 0; i < 10; i++) ei[8*i +: 8] = mb(p + 64'(i));
    for (int i = 0; i < 8; i++)  ed[8*i +: 8] = mb(da + 64'(i));
    expect_eq("i10bytes", i10bytes, ei);
    expect_eq("drdata", 80'(drdata), 80'(ed));
    expect_eq("dbg_data", 80'(dbg_data), 80'(ed));
  endtask

  initial begin
    static logic [7:0] ex [16] = '{8'h60, 8'h12, 8'h61, 8'h21, 8'h00, 8'h00, 8'h00, 8'h00,
                            8'h00, 8'h00, 8'h01, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00};
    dwe = 0; load_en = 0; load_addr = '0; load_data = '0; dwdata = '0;
    pc = '0; daddr = '0; dbg_addr = '0;
    for (int i = 0; i < int'(MB); i++) load(64'(i), 8'h00);
    for (int i = 0; i < 16; i++) load(64'(i), ex[i]);
    // values from the table in the document
    pc = 64'h0; #1; expect_eq("i10bytes@0", i10bytes, 80'h0000_0000_0000_0021_6112_60 );
    pc = 64'h1; #1; expect_eq("i10bytes@1", i10bytes, 80'h0100_0000_0000_0021_6112);
    pc = 64'h2; #1; expect_eq("i10bytes@2", i10bytes, 80'h0001_0000_0000_0000_2161);
    pc = 64'h3; #1; expect_eq("i10bytes@3", i10bytes, 80'h0000_0100_0000_0000_0021);
    // random loads, data writes and reads
    for (int n = 0; n < 600; n++) begin
      int kind;
      kind = $urandom % 3;
      if (kind == 0) begin
        load(64'($urandom % (MB + 16)), 8'($urandom));
      end else if (kind == 1) begin
        logic [63:0] a, v;
        a = 64'($urandom % (MB + 16));
        v = {$urandom, $urandom};
        @(negedge clk);
        daddr = a; dwdata = v; dwe = 1;
        #1;
        // old contents still visible before the edge
        expect_eq("drdata before write", 80'(drdata),
                  80'({mb(a+7), mb(a+6), mb(a+5), mb(a+4), mb(a+3), mb(a+2), mb(a+1), mb(a)}));
        @(posedge clk); #1;
        dwe = 0;
        for (int i = 0; i < 8; i++) if (a + 64'(i) < MB) model[a[7:0] + 8'(i)] = v[8*i +: 8];
      end
      check_ports(64'($urandom % (MB + 16)), 64'($urandom % (MB + 16)));
    end
    // a data write is seen by the instruction port
    @(negedge clk);
    daddr = 64'h40; dwdata = 64'h1122334455667788; dwe = 1;
    @(posedge clk); #1; dwe = 0;
    for (int i = 0; i < 8; i++) model[8'h40 + 8'(i)] = dwdata[8*i +: 8];
    pc = 64'h40; #1;
    expect_eq("fetch after store", 80'(i10bytes[63:0]), 80'h1122334455667788);
    // beyond the end: zeros
    pc = 64'(MB + 100); daddr = 64'hFFFF_0000_0000_0000; #1;
    expect_eq("fetch beyond end", i10bytes, 80'h0);
    expect_eq("read beyond end", 80'(drdata), 80'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
