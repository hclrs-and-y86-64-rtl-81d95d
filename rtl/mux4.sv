// mux4: four-input multiplexer.
//
// sel = {select bit 1, select bit 0} picks a (00), b (01), c (10) or d (11),
// the truth table of the classic 4:1 MUX. Purely combinational. The width
// is a parameter; 64 bits suits the Y86-64 datapath.
module mux4 #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [1:0]       sel,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    unique case (sel)
      2'b00: y = a;
      2'b01: y = b;
      2'b10: y = c;
      2'b11: y = d;
    endcase
  end

endmodule
