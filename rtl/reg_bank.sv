// reg_bank: a clocked register bank such as the PC register.
//
// The output q is the stored value; on each rising clock edge the register
// loads d. Synchronous reset loads RESET_VALUE (the PC's "= 0" initial
// value). While stall is high the value is held; the CPUs use this to freeze
// once they have stopped, which is this design's own addition.
module reg_bank #(
  parameter int unsigned       WIDTH       = 64,
  parameter logic [WIDTH-1:0]  RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             stall,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)         q <= RESET_VALUE;
    else if (!stall) q <= d;
  end

endmodule
