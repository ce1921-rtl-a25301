// controller: combinational decoder from instruction fields to datapath control signals.
//
// Inputs are COND = INSTR[31:28], OP = INSTR[27:26], FUNCT = INSTR[25:20], ROT = INSTR[11:8]
// and the stored flags (only Z is used; C, V and N are inputs for later extensions). Each
// output is one independent equation of these inputs, as in the control table:
//
//   instruction        REGWR ALUSRCB EXTS  ROTATE ALUS  CPSRWR MEMWR REGSRC REGDST PCSRC
//   ADD/SUB/AND/ORR/   1     1 (reg) IMM8  0      op    0      0     1 (F)  0      0
//    EOR/MOV Rd,..Rm
//   same with #imm     1     0 (imm) IMM8  ROT    op    0      0     1 (F)  0      0
//   CMP Rn, Rm / #imm  0     reg/imm IMM8  0/ROT  SUB   1      0     1      0      0
//   LDR Rd,[Rn,#imm]   1     0       IMM12 0      ADD   0      0     0 (mem) 0     0
//   STR Rd,[Rn,#imm]   0     0       IMM12 0      ADD   0      1     0      1 (Rd) 0
//   B / BEQ / BNE      0     0       BR24  0      ADD   0      0     0      0      taken
//
// PCWR is always 1: the PC advances every clock. A branch is taken for COND = AL, for
// COND = EQ with Z set, and for COND = NE with Z clear. Any other instruction (other
// opcodes, other data-processing commands, branch with link) raises no write enable and
// so has no effect but to advance the PC.
//
// What follows the document: the instruction set, the signal names, the rule that only CMP
// writes the flags, only instructions with a destination write the register file, only STR
// writes memory and branches write neither, and LDR/STR told apart from data processing by
// OP = 01 alone. This design's choices: the polarities of the select signals and the ALUS and
// EXTS codes; COND is tested for branches only; the S bit of data-processing instructions is
// ignored (only CMP sets flags); the register operand is used unshifted (INSTR[11:4] is
// ignored); LDR and STR are told apart by the L bit FUNCT[0] and always add the offset.
module controller
  import scp_pkg::*;
(
  input  logic [3:0] COND,
  input  logic [1:0] OP,
  input  logic [5:0] FUNCT,
  input  logic [3:0] ROT,
  input  logic       C,
  input  logic       V,
  input  logic       N,
  input  logic       Z,
  output logic       PCSRC,
  output logic       PCWR,
  output logic       REGDST,
  output logic       REGWR,
  output logic [1:0] EXTS,
  output logic       ALUSRCB,
  output logic [2:0] ALUS,
  output logic       CPSRWR,
  output logic       MEMWR,
  output logic       REGSRC,
  output logic [3:0] ROTATE
);
  logic is_dp, is_mem, is_br, is_cmp, dp_ok, imm, load, taken;
  cmd_t cmd;

  always_comb begin
    imm    = FUNCT[5];
    cmd    = cmd_t'(FUNCT[4:1]);
    load   = FUNCT[0];
    is_dp  = (OP == OP_DP);
    is_mem = (OP == OP_MEM);
    is_br  = (OP == OP_BR) && (FUNCT[5:4] == 2'b10);   // B without link
    dp_ok  = is_dp && (cmd inside {CMD_AND, CMD_EOR, CMD_SUB, CMD_ADD, CMD_CMP, CMD_ORR, CMD_MOV});
    is_cmp = is_dp && (cmd == CMD_CMP);
    taken  = is_br && ((COND == COND_AL) || (COND == COND_EQ && Z) || (COND == COND_NE && !Z));

    PCWR    = 1'b1;
    PCSRC   = taken;
    REGDST  = is_mem && !load;
    REGWR   = (dp_ok && !is_cmp) || (is_mem && load);
    EXTS    = is_br ? EXT_BR24 : (is_mem ? EXT_IMM12 : EXT_IMM8);
    ALUSRCB = is_dp && !imm;
    ROTATE  = (is_dp && imm) ? ROT : 4'd0;
    CPSRWR  = is_cmp;
    MEMWR   = is_mem && !load;
    REGSRC  = is_dp;

    if (is_dp) begin
      unique case (cmd)
        CMD_AND: ALUS = ALU_AND;
        CMD_EOR: ALUS = ALU_EOR;
        CMD_SUB: ALUS = ALU_SUB;
        CMD_CMP: ALUS = ALU_SUB;
        CMD_ORR: ALUS = ALU_ORR;
        CMD_MOV: ALUS = ALU_PASSB;
        default: ALUS = ALU_ADD;
      endcase
    end else begin
      ALUS = ALU_ADD;
    end
  end

  // C, V and N are reserved for conditions this controller does not yet decode.
  logic unused_flags;
  assign unused_flags = C ^ V ^ N;
endmodule
