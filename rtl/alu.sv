// alu: WIDTH-bit arithmetic logic unit with ARM-style condition flags.
//
// S selects the function (encodings in scp_pkg::alus_t): ADD, SUB (A - B), AND, ORR, EOR and
// PASSB (F = B, used by MOV). Flags follow ARMv4: N is F's sign bit, Z is set when F is zero,
// C is the carry out of ADD or the not-borrow of SUB (set when A >= B unsigned), and V is the
// signed overflow of ADD or SUB. The logic functions and PASSB give C = V = 0. Unused codes
// give F = 0. Combinational. The document names the unit, its ports and its flags; the
// function list comes from the instructions it must run, and the encoding and the flag
// values for logic functions are this design's choice.
module alu
  import scp_pkg::*;
#(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] A,
  input  logic [WIDTH-1:0] B,
  input  logic [2:0]       S,
  output logic [WIDTH-1:0] F,
  output logic             C,
  output logic             V,
  output logic             N,
  output logic             Z
);
  logic [WIDTH:0] sum;
  always_comb begin
    sum = '0;
    C   = 1'b0;
    V   = 1'b0;
    unique case (S)
      ALU_ADD: begin
        sum = {1'b0, A} + {1'b0, B};
        F   = sum[WIDTH-1:0];
        C   = sum[WIDTH];
        V   = (A[WIDTH-1] == B[WIDTH-1]) && (F[WIDTH-1] != A[WIDTH-1]);
      end
      ALU_SUB: begin
        sum = {1'b0, A} + {1'b0, ~B} + (WIDTH+1)'(1);
        F   = sum[WIDTH-1:0];
        C   = sum[WIDTH];
        V   = (A[WIDTH-1] != B[WIDTH-1]) && (F[WIDTH-1] != A[WIDTH-1]);
      end
      ALU_AND:   F = A & B;
      ALU_ORR:   F = A | B;
      ALU_EOR:   F = A ^ B;
      ALU_PASSB: F = B;
      default:   F = '0;
    endcase
    N = F[WIDTH-1];
    Z = (F == '0);
  end
endmodule
