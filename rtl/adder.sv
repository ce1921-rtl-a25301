// adder: WIDTH-bit binary adder, S = A + B (carry out discarded).
//
// Used three times in the processor: PC+4 and PC+8 in the fetch stage, and PC+8 plus the
// extended branch offset in the decode stage. Purely combinational. The document names the
// block and its ports; the behaviour is a plain modular sum.
module adder #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] A,
  input  logic [WIDTH-1:0] B,
  output logic [WIDTH-1:0] S
);
  always_comb S = A + B;
endmodule
