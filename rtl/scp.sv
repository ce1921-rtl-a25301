// scp: single-cycle processor for a subset of ARMv4.
//
// Each clock period runs one whole instruction. Fetch reads the instruction at PC and forms
// PC+4 and PC+8; decode reads the registers, extends and rotates the immediate and forms the
// branch address PC+8 + offset; execute runs the ALU and stores the flags on CMP; the data
// memory is addressed by the ALU result; the REGSRC multiplexer picks the write-back value
// WD3 (1 = ALU result F, 0 = memory read data), which is written to the register file at the
// end of the period. The PCSRC multiplexer picks the next PC (1 = branch address, 0 = PC+4).
// The controller decodes COND, OP, FUNCT and ROT of the current instruction and the stored
// Z flag. After RST (active high, asynchronous) the PC, registers, flags and data memory are
// zero and execution starts at address 0 of the instruction ROM.
//
// The outputs are the write-back bus WD3, every controller output, the memory buses and
// PC+4, as in the document's top-level schematic, plus INSTR, BRADDR and PC for observation.
// The wiring follows that schematic; the mux input polarities and the data memory size are
// this design's choices.
module scp
  import scp_pkg::*;
#(
  parameter int                          PROG_WORDS = SUMN_WORDS,
  parameter logic [PROG_WORDS-1:0][31:0] PROGRAM    = SUMN_PROGRAM,
  parameter int                          DMEM_WORDS = 64
) (
  input  logic        CLK,
  input  logic        RST,
  output logic [31:0] WD3,
  output logic        PCSRC,
  output logic        PCWR,
  output logic        REGDST,
  output logic        REGWR,
  output logic [1:0]  EXTS,
  output logic        ALUSRCB,
  output logic [2:0]  ALUS,
  output logic        CPSRWR,
  output logic        MEMWR,
  output logic        REGSRC,
  output logic [3:0]  ROTATE,
  output logic [31:0] MEMADDR,
  output logic [31:0] MEMDATA,
  output logic [31:0] PC4,
  output logic [31:0] INSTR,
  output logic [31:0] BRADDR,
  output logic [31:0] PC
);
  logic [31:0] pcwd, pc8, rd1, rd2, imm32, f, memrd;
  logic        c, v, n, z;

  busmux2to1 #(.WIDTH(32)) u_pcsrc_mux (.D1(BRADDR), .D0(PC4), .S(PCSRC), .Y(pcwd));

  fetch #(.WIDTH(32), .PROG_WORDS(PROG_WORDS), .PROGRAM(PROGRAM)) u_fetch (
    .PCWD(pcwd), .PCWE(PCWR), .RST(RST), .CLK(CLK),
    .PC4(PC4), .PC8(pc8), .INSTR(INSTR), .PC(PC)
  );

  decode #(.WIDTH(32)) u_decode (
    .PC8(pc8), .INSTR(INSTR), .WD3(WD3), .REGDST(REGDST), .REGWR(REGWR), .EXTS(EXTS),
    .ROTATE(ROTATE), .RST(RST), .CLK(CLK),
    .BRADDR(BRADDR), .RD1(rd1), .RD2(rd2), .IMM32(imm32)
  );

  execute #(.WIDTH(32)) u_execute (
    .RD1(rd1), .RD2(rd2), .IMM32(imm32), .ALUSRCB(ALUSRCB), .ALUS(ALUS), .CPSRWR(CPSRWR),
    .RST(RST), .CLK(CLK), .F(f), .C(c), .V(v), .N(n), .Z(z)
  );

  dmem #(.WIDTH(32), .WORDS(DMEM_WORDS)) u_dmem (
    .A(f), .WD(rd2), .MEMWR(MEMWR), .RST(RST), .CLK(CLK), .RD(memrd)
  );

  busmux2to1 #(.WIDTH(32)) u_regsrc_mux (.D1(f), .D0(memrd), .S(REGSRC), .Y(WD3));

  controller u_controller (
    .COND(INSTR[31:28]), .OP(INSTR[27:26]), .FUNCT(INSTR[25:20]), .ROT(INSTR[11:8]),
    .C(c), .V(v), .N(n), .Z(z),
    .PCSRC(PCSRC), .PCWR(PCWR), .REGDST(REGDST), .REGWR(REGWR), .EXTS(EXTS),
    .ALUSRCB(ALUSRCB), .ALUS(ALUS), .CPSRWR(CPSRWR), .MEMWR(MEMWR), .REGSRC(REGSRC),
    .ROTATE(ROTATE)
  );

  assign MEMADDR = f;
  assign MEMDATA = rd2;
endmodule
