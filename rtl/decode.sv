// decode: decode stage.
//
// Reads R[Rn] (INSTR[19:16]) on RD1 and, through the register source multiplexer, either
// R[Rm] (INSTR[3:0], REGDST = 0) or R[Rd] (INSTR[15:12], REGDST = 1, for STR's data) on RD2.
// The write-back value WD3 is written to R[Rd] on the rising CLK edge when REGWR is high.
// The extender widens INSTR[23:0] as EXTS selects and the barrel rotator turns it right by
// 2*ROTATE, giving IMM32. A separate adder forms the branch address BRADDR = PC8 + the
// extended (unrotated) immediate, so branches never use the ALU. RD1, RD2, IMM32 and BRADDR
// are combinational. The structure follows the document's decode schematic; taking the
// branch adder's operand before the rotator is this design's reading of it (the rotate is
// zero for branches, so both readings give the same address).
module decode #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] PC8,
  input  logic [31:0]      INSTR,
  input  logic [WIDTH-1:0] WD3,
  input  logic             REGDST,
  input  logic             REGWR,
  input  logic [1:0]       EXTS,
  input  logic [3:0]       ROTATE,
  input  logic             RST,
  input  logic             CLK,
  output logic [WIDTH-1:0] BRADDR,
  output logic [WIDTH-1:0] RD1,
  output logic [WIDTH-1:0] RD2,
  output logic [WIDTH-1:0] IMM32
);
  logic [3:0]       a2;
  logic [31:0]      ext32;
  logic [WIDTH-1:0] ext;

  regsrcbmux u_regsrcbmux (.D1(INSTR[15:12]), .D0(INSTR[3:0]), .S(REGDST), .Y(a2));

  regfile #(.WIDTH(WIDTH), .NREGS(16)) u_regfile (
    .A1(INSTR[19:16]), .A2(a2), .A3(INSTR[15:12]), .WD3(WD3), .REGWR(REGWR),
    .RST(RST), .CLK(CLK), .RD1(RD1), .RD2(RD2)
  );

  extimm u_extimm (.IMM(INSTR[23:0]), .EXTS(EXTS), .IMM32(ext32));
  assign ext = WIDTH'(ext32);

  barrel #(.WIDTH(WIDTH)) u_barrel (.in_src2(ext), .rotate(ROTATE), .out_src2(IMM32));

  adder #(.WIDTH(WIDTH)) u_bradder (.A(PC8), .B(ext), .S(BRADDR));
endmodule
