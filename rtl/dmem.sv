// dmem: data memory of WORDS 32-bit words.
//
// A is a byte address; the word at A[log2(WORDS)+1:2] is read combinationally on RD (the two
// low bits are ignored and higher bits wrap around). On a rising CLK edge with MEMWR high
// that word takes WD. RST (active high, asynchronous) clears the whole memory, so a program
// starts from a known state. The document names the memory and its pins but gives neither
// its size nor its reset behaviour: the 64-word depth, the word addressing and the reset
// are this design's choices.
module dmem #(
  parameter int WIDTH = 32,
  parameter int WORDS = 64
) (
  input  logic [WIDTH-1:0] A,
  input  logic [WIDTH-1:0] WD,
  input  logic             MEMWR,
  input  logic             RST,
  input  logic             CLK,
  output logic [WIDTH-1:0] RD
);
  localparam int AW = $clog2(WORDS);

  logic [WIDTH-1:0] mem [WORDS];
  logic [AW-1:0]    idx;

  assign idx = A[AW+1:2];

  always_ff @(posedge CLK or posedge RST) begin
    if (RST) begin
      for (int i = 0; i < WORDS; i++) mem[i] <= '0;
    end else if (MEMWR) begin
      mem[idx] <= WD;
    end
  end

  assign RD = mem[idx];
endmodule
