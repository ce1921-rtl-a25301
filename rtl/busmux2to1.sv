// busmux2to1: WIDTH-bit 2:1 bus multiplexer, Y = D1 when S is high, else D0.
//
// Used for the ALU B operand (ALUSRCB), the next PC (PCSRC) and the write-back value
// (REGSRC). Combinational. The document names the block; its function is the plain mux.
module busmux2to1 #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] D1,
  input  logic [WIDTH-1:0] D0,
  input  logic             S,
  output logic [WIDTH-1:0] Y
);
  always_comb Y = S ? D1 : D0;
endmodule
