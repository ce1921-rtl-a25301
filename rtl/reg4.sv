// reg4: 4-bit flag register holding the stored condition flags.
//
// Bit 3..0 carry C, V, N, Z. On a rising CLK edge with LD high, Q takes D; RST (active high,
// asynchronous) clears it. In the execute stage LD is CPSRWR, which the controller raises
// only for CMP, so the flags a branch tests are those of the most recent CMP. The pin
// order follows the document's execute schematic; the reset behaviour is this design's.
module reg4 (
  input  logic [3:0] D,
  input  logic       LD,
  input  logic       RST,
  input  logic       CLK,
  output logic [3:0] Q
);
  always_ff @(posedge CLK or posedge RST) begin
    if (RST)     Q <= '0;
    else if (LD) Q <= D;
  end
endmodule
