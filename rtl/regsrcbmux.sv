// regsrcbmux: 4-bit 2:1 multiplexer for the register file's second read address.
//
// Y = D1 when S is high, else D0. In the decode stage D1 is INSTR[15:12] (Rd, so STR can
// read the register it stores) and D0 is INSTR[3:0] (Rm), selected by REGDST. Combinational.
// The connections follow the document's decode schematic.
module regsrcbmux (
  input  logic [3:0] D1,
  input  logic [3:0] D0,
  input  logic       S,
  output logic [3:0] Y
);
  always_comb Y = S ? D1 : D0;
endmodule
