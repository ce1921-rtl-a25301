// extimm: immediate extender.
//
// Turns the low 24 instruction bits into a 32-bit operand according to EXTS:
//   EXT_IMM8  zero-extends IMM[7:0]   (data-processing immediate, rotated later by barrel)
//   EXT_IMM12 zero-extends IMM[11:0]  (LDR/STR offset)
//   EXT_BR24  sign-extends IMM[23:0] and shifts it left by 2 (branch offset in bytes)
// The unused code gives zero. Combinational. The document names the block and its ports;
// the three modes are those ARMv4 needs, and their encoding is this design's choice.
module extimm
  import scp_pkg::*;
(
  input  logic [23:0] IMM,
  input  logic [1:0]  EXTS,
  output logic [31:0] IMM32
);
  always_comb begin
    unique case (EXTS)
      EXT_IMM8:  IMM32 = {24'b0, IMM[7:0]};
      EXT_IMM12: IMM32 = {20'b0, IMM[11:0]};
      EXT_BR24:  IMM32 = {{6{IMM[23]}}, IMM, 2'b00};
      default:   IMM32 = '0;
    endcase
  end
endmodule
