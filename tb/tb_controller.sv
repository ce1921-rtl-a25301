// tb_controller: self-checking test of the controller against the control table, written
// out here signal by signal for every supported instruction form (data processing with
// register and immediate operands, CMP, LDR, STR, B, BEQ and BNE with Z both ways) and for
// unsupported instructions, which must write nothing.
module tb_controller;
  import scp_pkg::*;
  logic [31:0] instr;
  logic z;
  logic pcsrc, pcwr, regdst, regwr, alusrcb, cpsrwr, memwr, regsrc;
  logic [1:0] exts;
  logic [2:0] alus;
  logic [3:0] rotate;
  int checks = 0, failures = 0;
  controller dut (.COND(instr[31:28]), .OP(instr[27:26]), .FUNCT(instr[25:20]), .ROT(instr[11:8]),
    .C(1'b0), .V(1'b0), .N(1'b0), .Z(z), .PCSRC(pcsrc), .PCWR(pcwr), .REGDST(regdst), .REGWR(regwr),
    .EXTS(exts), .ALUSRCB(alusrcb), .ALUS(alus), .CPSRWR(cpsrwr), .MEMWR(memwr), .REGSRC(regsrc),
    .ROTATE(rotate));

  // expected: pcsrc regdst regwr exts alusrcb alus cpsrwr memwr regsrc rotate
  task automatic expect_ctl(input string name, input logic [31:0] ins, input logic zf,
                            input logic e_pcsrc, input logic e_regdst, input logic e_regwr,
                            input logic [1:0] e_exts, input logic e_alusrcb, input logic [2:0] e_alus,
                            input logic e_cpsrwr, input logic e_memwr, input logic e_regsrc,
                            input logic [3:0] e_rot, input logic care_data);
    instr = ins; z = zf; #1;
    checks++;
    if (pcwr != 1 || pcsrc != e_pcsrc || regwr != e_regwr || cpsrwr != e_cpsrwr || memwr != e_memwr ||
        (care_data && (regdst != e_regdst || exts != e_exts || alusrcb != e_alusrcb ||
                       alus != e_alus || regsrc != e_regsrc || rotate != e_rot))) begin
      failures++;
      $display("FAIL %s: pcsrc%b regdst%b regwr%b exts%0d srcb%b alus%0d cpsrwr%b memwr%b regsrc%b rot%0d",
               name, pcsrc, regdst, regwr, exts, alusrcb, alus, cpsrwr, memwr, regsrc, rotate);
    end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int zi = 0; zi < 2; zi++) begin
      logic zz = 1'(zi);
      //                                          pcs dst wr exts  srcb alus       cpsr mwr rsrc rot
      expect_ctl("ADD reg",  32'hE0812003, zz,    0,  0,  1, 2'b00, 1, ALU_ADD,   0,   0,  1,   0, 1);
      expect_ctl("ADD imm",  32'hE2812C05, zz,    0,  0,  1, 2'b00, 0, ALU_ADD,   0,   0,  1,  12, 1);
      expect_ctl("AND reg",  32'hE0012003, zz,    0,  0,  1, 2'b00, 1, ALU_AND,   0,   0,  1,   0, 1);
      expect_ctl("AND imm",  32'hE20120FF, zz,    0,  0,  1, 2'b00, 0, ALU_AND,   0,   0,  1,   0, 1);
      expect_ctl("CMP reg",  32'hE1580006, zz,    0,  0,  0, 2'b00, 1, ALU_SUB,   1,   0,  1,   0, 1);
      expect_ctl("CMP imm",  32'hE3580000, zz,    0,  0,  0, 2'b00, 0, ALU_SUB,   1,   0,  1,   0, 1);
      expect_ctl("EOR reg",  32'hE0212003, zz,    0,  0,  1, 2'b00, 1, ALU_EOR,   0,   0,  1,   0, 1);
      expect_ctl("EOR imm",  32'hE2212301, zz,    0,  0,  1, 2'b00, 0, ALU_EOR,   0,   0,  1,   3, 1);
      expect_ctl("LDR",      32'hE59C6000, zz,    0,  0,  1, 2'b01, 0, ALU_ADD,   0,   0,  0,   0, 0);
      expect_ctl("LDR regs", 32'hE5978008, zz,    0,  0,  1, 2'b01, 0, ALU_ADD,   0,   0,  0,   0, 0);
      expect_ctl("MOV reg",  32'hE1A06005, zz,    0,  0,  1, 2'b00, 1, ALU_PASSB, 0,   0,  1,   0, 1);
      expect_ctl("MOV imm",  32'hE3A0800A, zz,    0,  0,  1, 2'b00, 0, ALU_PASSB, 0,   0,  1,   0, 1);
      expect_ctl("ORR reg",  32'hE1813002, zz,    0,  0,  1, 2'b00, 1, ALU_ORR,   0,   0,  1,   0, 1);
      expect_ctl("ORR imm",  32'hE3813E3F, zz,    0,  0,  1, 2'b00, 0, ALU_ORR,   0,   0,  1,  14, 1);
      expect_ctl("STR",      32'hE58CB000, zz,    0,  1,  0, 2'b01, 0, ALU_ADD,   0,   1,  0,   0, 0);
      expect_ctl("SUB reg",  32'hE0445001, zz,    0,  0,  1, 2'b00, 1, ALU_SUB,   0,   0,  1,   0, 1);
      expect_ctl("SUB imm",  32'hE2488001, zz,    0,  0,  1, 2'b00, 0, ALU_SUB,   0,   0,  1,   0, 1);
      expect_ctl("B",        32'hEAFFFFFD, zz,    1,  0,  0, 2'b10, 0, ALU_ADD,   0,   0,  0,   0, 0);
      expect_ctl("BEQ",      32'h0A00000B, zz,   zz,  0,  0, 2'b10, 0, ALU_ADD,   0,   0,  0,   0, 0);
      expect_ctl("BNE",      32'h1AFFFFF9, zz,  !zz,  0,  0, 2'b10, 0, ALU_ADD,   0,   0,  0,   0, 0);
      // unsupported: BL, coprocessor/op 11, an unlisted command (TST), BGT
      expect_ctl("BL",       32'hEB000004, zz,    0,  0,  0, 2'b00, 0, ALU_ADD,   0,   0,  0,   0, 0);
      expect_ctl("op 11",    32'hEE000000, zz,    0,  0,  0, 2'b00, 0, ALU_ADD,   0,   0,  0,   0, 0);
      expect_ctl("TST",      32'hE1100001, zz,    0,  0,  0, 2'b00, 0, ALU_ADD,   0,   0,  0,   0, 0);
      expect_ctl("BGT",      32'hCA000001, zz,    0,  0,  0, 2'b10, 0, ALU_ADD,   0,   0,  0,   0, 0);
    end
    // EXTS is checked separately for memory instructions, where the data fields were not compared
    instr = 32'hE59C6000; #1; checks++; if (exts != EXT_IMM12 || alus != ALU_ADD || alusrcb != 0 || regsrc != 0) failures++;
    instr = 32'hE58CB000; #1; checks++; if (exts != EXT_IMM12 || regdst != 1 || alusrcb != 0) failures++;
    instr = 32'h0A00000B; #1; checks++; if (exts != EXT_BR24) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
