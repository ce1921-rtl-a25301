// fetch: instruction fetch stage.
//
// The PC register addresses the instruction ROM, and two adders form PC+4 and PC+8 from the
// PC in parallel: the 0x8 constant feeds its own adder rather than chaining a second +4
// after PC+4, so PC+8 is ready after one adder delay. PC+4 is the sequential next PC and PC+8
// is the base of the branch address formed in decode. PCWD is loaded into the PC on the
// rising CLK edge when PCWE is high; RST (active high, asynchronous) clears it. The structure
// follows the document's fetch schematic; the extra PC output is for observation only.
module fetch
  import scp_pkg::*;
#(
  parameter int                          WIDTH      = 32,
  parameter int                          PROG_WORDS = SUMN_WORDS,
  parameter logic [PROG_WORDS-1:0][31:0] PROGRAM    = SUMN_PROGRAM
) (
  input  logic [WIDTH-1:0] PCWD,
  input  logic             PCWE,
  input  logic             RST,
  input  logic             CLK,
  output logic [WIDTH-1:0] PC4,
  output logic [WIDTH-1:0] PC8,
  output logic [31:0]      INSTR,
  output logic [WIDTH-1:0] PC
);
  localparam logic [WIDTH-1:0] CONST4 = WIDTH'(4);
  localparam logic [WIDTH-1:0] CONST8 = WIDTH'(8);

  pc #(.WIDTH(WIDTH)) u_pc (.D(PCWD), .LD(PCWE), .RST(RST), .CLK(CLK), .Q(PC));

  adder #(.WIDTH(WIDTH)) u_add8 (.A(CONST8), .B(PC), .S(PC8));
  adder #(.WIDTH(WIDTH)) u_add4 (.A(CONST4), .B(PC), .S(PC4));

  irom #(.PROG_WORDS(PROG_WORDS), .PROGRAM(PROGRAM)) u_irom (.A(32'(PC)), .RD(INSTR));
endmodule
