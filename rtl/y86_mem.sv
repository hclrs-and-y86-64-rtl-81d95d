// y86_mem: the Y86-64 memory, one byte array seen through two ports.
//
// Instruction port: i10bytes is the ten bytes at pc..pc+9, byte pc in bits
// 7:0 (little-endian), read combinationally. Data port: drdata is the eight
// bytes at daddr, little-endian, read combinationally; when dwe is high the
// eight bytes of dwdata are written at daddr on the rising clock edge.
// Because both ports see the same array, a data write changes what a later
// fetch at that address returns, as in Y86-64.
//
// A loader port writes one byte per clock (load_en/load_addr/load_data); it
// stands in for loading a program image and wins over a data write in the
// same cycle. dbg_addr/dbg_data is a further 8-byte read port for
// observation. Bytes at or above MEM_BYTES read as 0 and writes to them are
// dropped. The size and the out-of-range behaviour are this design's choice.
module y86_mem #(
  parameter int unsigned MEM_BYTES = 1024
) (
  input  logic        clk,
  input  logic [63:0] pc,
  output logic [79:0] i10bytes,
  input  logic [63:0] daddr,
  input  logic        dwe,
  input  logic [63:0] dwdata,
  output logic [63:0] drdata,
  input  logic        load_en,
  input  logic [63:0] load_addr,
  input  logic [7:0]  load_data,
  input  logic [63:0] dbg_addr,
  output logic [63:0] dbg_data
);

  logic [7:0] mem [MEM_BYTES];

  function automatic logic [7:0] rd_byte(input logic [63:0] a);
    if (a < 64'(MEM_BYTES)) return mem[a[$clog2(MEM_BYTES)-1:0]];
    else                    return 8'h00;
  endfunction

  always_comb begin
    for (int i = 0; i < 10; i++) i10bytes[8*i +: 8] = rd_byte(pc + 64'(i));
    for (int i = 0; i < 8; i++) begin
      drdata[8*i +: 8]   = rd_byte(daddr + 64'(i));
      dbg_data[8*i +: 8] = rd_byte(dbg_addr + 64'(i));
    end
  end

  always_ff @(posedge clk) begin
    if (load_en) begin
      if (load_addr < 64'(MEM_BYTES)) mem[load_addr[$clog2(MEM_BYTES)-1:0]] <= load_data;
    end else if (dwe) begin
      for (int i = 0; i < 8; i++) begin
        if (daddr + 64'(i) < 64'(MEM_BYTES))
          mem[(daddr[$clog2(MEM_BYTES)-1:0] + $clog2(MEM_BYTES)'(i))] <= dwdata[8*i +: 8];
      end
    end
  end

endmodule
