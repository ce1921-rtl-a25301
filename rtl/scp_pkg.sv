// scp_pkg: types and constants shared by the single-cycle ARMv4-subset processor.
//
// The processor runs a small ARMv4 subset (MOV, ADD, SUB, AND, ORR, EOR, CMP in register
// and immediate form, immediate-offset LDR/STR, and B, BEQ, BNE) with one instruction per
// clock. This package holds the instruction field encodings, which are those of ARMv4, and
// the datapath control encodings (ALU function, extender mode), which are this design's
// own choice because the control words are left for the implementer to fill in. It also
// holds the "sumn" test program, which sums the integers 1..10 and stores 1 in data word 1
// (byte address 4) when the sum is at least 32.
package scp_pkg;

  // ALU function select (ALUS). Encoding is this design's choice.
  typedef enum logic [2:0] {
    ALU_ADD  = 3'b000,
    ALU_SUB  = 3'b001,
    ALU_AND  = 3'b010,
    ALU_ORR  = 3'b011,
    ALU_EOR  = 3'b100,
    ALU_PASSB = 3'b101   // F = B, used by MOV
  } alus_t;

  // Immediate extender mode (EXTS). Encoding is this design's choice.
  typedef enum logic [1:0] {
    EXT_IMM8  = 2'b00,   // zero-extend INSTR[7:0]   (data-processing immediate)
    EXT_IMM12 = 2'b01,   // zero-extend INSTR[11:0]  (LDR/STR offset)
    EXT_BR24  = 2'b10    // sign-extend INSTR[23:0], shifted left by 2 (branch offset)
  } exts_t;

  // ARMv4 instruction fields.
  typedef enum logic [1:0] {
    OP_DP  = 2'b00,      // data processing
    OP_MEM = 2'b01,      // single data transfer
    OP_BR  = 2'b10       // branch
  } op_t;

  typedef enum logic [3:0] {
    CMD_AND = 4'b0000,
    CMD_EOR = 4'b0001,
    CMD_SUB = 4'b0010,
    CMD_ADD = 4'b0100,
    CMD_CMP = 4'b1010,
    CMD_ORR = 4'b1100,
    CMD_MOV = 4'b1101
  } cmd_t;

  localparam logic [3:0] COND_EQ = 4'b0000;
  localparam logic [3:0] COND_NE = 4'b0001;
  localparam logic [3:0] COND_AL = 4'b1110;

  // The sumn test program, word i at byte address 4*i (word 0 in the lowest bits).
  localparam int SUMN_WORDS = 18;
  localparam logic [SUMN_WORDS-1:0][31:0] SUMN_PROGRAM = {
    32'hEAFF_FFFD,  // 0x44         B     done
    32'hE59C_6000,  // 0x40 done:   LDR   R6, [R12]
    32'hE58C_B000,  // 0x3C         STR   R11, [R12]
    32'hE3A0_C004,  // 0x38         MOV   R12, #4
    32'hE3A0_B001,  // 0x34         MOV   R11, #1
    32'h0A00_0002,  // 0x30         BEQ   done
    32'hE35A_0000,  // 0x2C         CMP   R10, #0
    32'hE009_A00A,  // 0x28         AND   R10, R9, R10
    32'hE24A_A020,  // 0x24         SUB   R10, R10, #32
    32'hE3A0_A000,  // 0x20 if:     MOV   R10, #0
    32'h1AFF_FFF9,  // 0x1C         BNE   loop
    32'hE358_0000,  // 0x18         CMP   R8, #0
    32'hE248_8001,  // 0x14         SUB   R8, R8, #1
    32'hE089_9008,  // 0x10         ADD   R9, R9, R8
    32'h0A00_000B,  // 0x0C         BEQ   done
    32'hE358_0000,  // 0x08 loop:   CMP   R8, #0
    32'hE3A0_9000,  // 0x04         MOV   R9, #0
    32'hE3A0_800A   // 0x00 main:   MOV   R8, #10
  };

endpackage
