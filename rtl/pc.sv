// pc: program counter register.
//
// On a rising CLK edge with LD high, Q takes D. RST is active high and asynchronous and
// clears Q to zero, so the processor starts at the first word of the instruction ROM. The
// document shows the D, LD, RST and CLK pins; the reset polarity, its asynchronous timing
// and the reset value of zero are this design's choices.
module pc #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] D,
  input  logic             LD,
  input  logic             RST,
  input  logic             CLK,
  output logic [WIDTH-1:0] Q
);
  always_ff @(posedge CLK or posedge RST) begin
    if (RST)     Q <= '0;
    else if (LD) Q <= D;
  end
endmodule
