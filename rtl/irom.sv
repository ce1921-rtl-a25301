// irom: instruction ROM, read combinationally.
//
// RD is the word at byte address A; the two low address bits are ignored, since ARMv4
// instructions are word aligned. Addresses beyond the program read as zero. The contents
// default to the sumn test program from scp_pkg; PROGRAM can be overridden to run another
// program. The ROM and its contents follow the document; the zero read beyond the program
// is this design's choice.
module irom
  import scp_pkg::*;
#(
  parameter int                          PROG_WORDS = SUMN_WORDS,
  parameter logic [PROG_WORDS-1:0][31:0] PROGRAM    = SUMN_PROGRAM
) (
  input  logic [31:0] A,
  output logic [31:0] RD
);
  logic [29:0] word;
  always_comb begin
    word = A[31:2];
    RD   = '0;
    for (int i = 0; i < PROG_WORDS; i++)
      if (word == 30'(i)) RD = PROGRAM[i];
  end
endmodule
