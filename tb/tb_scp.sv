// tb_scp: end-to-end test of the single-cycle processor.
//
// Four processors run side by side: one with its default ROM (the sumn program: sum 1..10 and
// store 1 in data word 1 when the sum is at least 32), two with sumn changed to n = 5 (the sum
// stays below 32, so the store is skipped) and n = 0 (the loop exits at once), and one with
// a second program, built
// here, that uses the immediate rotator, register operands, ORR, EOR, LDR/STR with a
// non-zero offset and branches taken and not taken. Each processor is checked every clock
// against an instruction-level model written in this testbench: the PC, and the register
// or memory write of every instruction. One instruction must complete per clock. At the end
// the architectural results are compared with values worked out by hand, and each mechanism
// (taken and untaken conditional branches, unconditional branch, flag write on CMP, load,
// store, non-zero immediate rotate, register operand, immediate operand) must have occurred.
module tb_scp;
  import scp_pkg::*;

  localparam int P2_WORDS = 20;
  // word i at index i
  localparam logic [P2_WORDS-1:0][31:0] P2 = {
    32'hEAFFFFFE,  // 0x4C fail:  B    fail
    32'hE3A0B0BA,  // 0x48        MOV  R11, #0xBA
    32'hEAFFFFFE,  // 0x44 end:   B    end
    32'hE20AA0F0,  // 0x40        AND  R10, R10, #0xF0
    32'hE088A001,  // 0x3C        ADD  R10, R8, R1
    32'h0A000002,  // 0x38        BEQ  fail
    32'hE3580001,  // 0x34 skip:  CMP  R8, #1
    32'hE3A09001,  // 0x30        MOV  R9, #1        (skipped)
    32'h0A000000,  // 0x2C        BEQ  skip
    32'h1A000006,  // 0x28        BNE  fail
    32'hE1580006,  // 0x24        CMP  R8, R6
    32'hE5978008,  // 0x20        LDR  R8, [R7, #8]
    32'hE5876008,  // 0x1C        STR  R6, [R7, #8]
    32'hE3A07020,  // 0x18        MOV  R7, #0x20
    32'hE1A06005,  // 0x14        MOV  R6, R5
    32'hE0445001,  // 0x10        SUB  R5, R4, R1
    32'hE223400F,  // 0x0C        EOR  R4, R3, #0x0F
    32'hE1813002,  // 0x08        ORR  R3, R1, R2
    32'hE3A02E3F,  // 0x04        MOV  R2, #0x3F0    (0x3F ror 28)
    32'hE3A014FF   // 0x00        MOV  R1, #0xFF000000 (0xFF ror 8)
  };

  // the sumn program with n = 5 (sum 15 < 32: the store is skipped) and n = 0 (loop never runs)
  localparam logic [SUMN_WORDS-1:0][31:0] SUMN5 = {SUMN_PROGRAM[SUMN_WORDS-1:1], 32'hE3A08005};
  localparam logic [SUMN_WORDS-1:0][31:0] SUMN0 = {SUMN_PROGRAM[SUMN_WORDS-1:1], 32'hE3A08000};
  localparam int NDUT = 4;

  logic clk = 0, rst;
  always #5 clk = ~clk;

  // DUT 0: default program. DUT 1: second program. DUT 2, 3: sumn with n = 5 and n = 0.
  logic [31:0] wd3 [NDUT], memaddr [NDUT], memdata [NDUT], pc4 [NDUT], instr [NDUT], braddr [NDUT], pcq [NDUT];
  logic pcsrc [NDUT], pcwr [NDUT], regdst [NDUT], regwr [NDUT], alusrcb [NDUT], cpsrwr [NDUT], memwr [NDUT], regsrc [NDUT];
  logic [1:0] exts [NDUT];
  logic [2:0] alus [NDUT];
  logic [3:0] rotate [NDUT];

  scp dut0 (.CLK(clk), .RST(rst), .WD3(wd3[0]), .PCSRC(pcsrc[0]), .PCWR(pcwr[0]), .REGDST(regdst[0]),
    .REGWR(regwr[0]), .EXTS(exts[0]), .ALUSRCB(alusrcb[0]), .ALUS(alus[0]), .CPSRWR(cpsrwr[0]),
    .MEMWR(memwr[0]), .REGSRC(regsrc[0]), .ROTATE(rotate[0]), .MEMADDR(memaddr[0]), .MEMDATA(memdata[0]),
    .PC4(pc4[0]), .INSTR(instr[0]), .BRADDR(braddr[0]), .PC(pcq[0]));
  scp #(.PROG_WORDS(P2_WORDS), .PROGRAM(P2), .DMEM_WORDS(64)) dut1 (.CLK(clk), .RST(rst), .WD3(wd3[1]),
    .PCSRC(pcsrc[1]), .PCWR(pcwr[1]), .REGDST(regdst[1]), .REGWR(regwr[1]), .EXTS(exts[1]),
    .ALUSRCB(alusrcb[1]), .ALUS(alus[1]), .CPSRWR(cpsrwr[1]), .MEMWR(memwr[1]), .REGSRC(regsrc[1]),
    .ROTATE(rotate[1]), .MEMADDR(memaddr[1]), .MEMDATA(memdata[1]), .PC4(pc4[1]), .INSTR(instr[1]),
    .BRADDR(braddr[1]), .PC(pcq[1]));
  scp #(.PROG_WORDS(SUMN_WORDS), .PROGRAM(SUMN5)) dut2 (.CLK(clk), .RST(rst), .WD3(wd3[2]),
    .PCSRC(pcsrc[2]), .PCWR(pcwr[2]), .REGDST(regdst[2]), .REGWR(regwr[2]), .EXTS(exts[2]),
    .ALUSRCB(alusrcb[2]), .ALUS(alus[2]), .CPSRWR(cpsrwr[2]), .MEMWR(memwr[2]), .REGSRC(regsrc[2]),
    .ROTATE(rotate[2]), .MEMADDR(memaddr[2]), .MEMDATA(memdata[2]), .PC4(pc4[2]), .INSTR(instr[2]),
    .BRADDR(braddr[2]), .PC(pcq[2]));
  scp #(.PROG_WORDS(SUMN_WORDS), .PROGRAM(SUMN0)) dut3 (.CLK(clk), .RST(rst), .WD3(wd3[3]),
    .PCSRC(pcsrc[3]), .PCWR(pcwr[3]), .REGDST(regdst[3]), .REGWR(regwr[3]), .EXTS(exts[3]),
    .ALUSRCB(alusrcb[3]), .ALUS(alus[3]), .CPSRWR(cpsrwr[3]), .MEMWR(memwr[3]), .REGSRC(regsrc[3]),
    .ROTATE(rotate[3]), .MEMADDR(memaddr[3]), .MEMDATA(memdata[3]), .PC4(pc4[3]), .INSTR(instr[3]),
    .BRADDR(braddr[3]), .PC(pcq[3]));

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- instruction-level reference model ----------------
  logic [31:0] m_pc [NDUT];
  logic [31:0] m_r [NDUT][16];
  logic [31:0] m_mem [NDUT][64];
  logic        m_z [NDUT];
  // what the current instruction writes
  logic        m_regwe [NDUT], m_memwe [NDUT];
  logic [3:0]  m_rd [NDUT];
  logic [31:0] m_val [NDUT], m_addr [NDUT];

  // mechanism counters
  int n_br_taken = 0, n_br_untaken = 0, n_b_always = 0, n_cmp = 0, n_ldr = 0, n_str = 0;
  int n_rot = 0, n_regop = 0, n_immop = 0;

  function automatic logic [31:0] fetch_word(input int k, input logic [31:0] a);
    case (k)
      0: return (a / 4 < SUMN_WORDS) ? SUMN_PROGRAM[a / 4] : 32'h0;
      1: return (a / 4 < P2_WORDS) ? P2[a / 4] : 32'h0;
      2: return (a / 4 < SUMN_WORDS) ? SUMN5[a / 4] : 32'h0;
      default: return (a / 4 < SUMN_WORDS) ? SUMN0[a / 4] : 32'h0;
    endcase
  endfunction

  // Executes the instruction at m_pc[k] on the model; records its writes and advances the PC.
  task automatic model_step(input int k);
    logic [31:0] ins, op2, res, a;
    logic [3:0] cmd, cond;
    logic taken;
    int rot;
    ins = fetch_word(k, m_pc[k]);
    cond = ins[31:28];
    m_regwe[k] = 0; m_memwe[k] = 0; m_rd[k] = ins[15:12];
    case (ins[27:26])
      2'b00: begin
        cmd = ins[24:21];
        if (ins[25]) begin
          rot = 2 * int'(ins[11:8]);
          op2 = 32'(ins[7:0]);
          if (rot != 0) begin op2 = (op2 >> rot) | (op2 << (32 - rot)); n_rot++; end
          n_immop++;
        end else begin
          op2 = m_r[k][ins[3:0]];
          n_regop++;
        end
        a = m_r[k][ins[19:16]];
        case (cmd)
          4'b0100: res = a + op2;
          4'b0010, 4'b1010: res = a - op2;
          4'b0000: res = a & op2;
          4'b1100: res = a | op2;
          4'b0001: res = a ^ op2;
          4'b1101: res = op2;
          default: res = 0;
        endcase
        if (cmd == 4'b1010) begin m_z[k] = (res == 0); n_cmp++; end
        else begin m_regwe[k] = 1; m_val[k] = res; end
        m_pc[k] = m_pc[k] + 4;
      end
      2'b01: begin
        m_addr[k] = m_r[k][ins[19:16]] + 32'(ins[11:0]);
        if (ins[20]) begin
          m_regwe[k] = 1; m_val[k] = m_mem[k][(m_addr[k] / 4) % 64]; n_ldr++;
        end else begin
          m_memwe[k] = 1; m_val[k] = m_r[k][ins[15:12]]; n_str++;
        end
        m_pc[k] = m_pc[k] + 4;
      end
      default: begin
        taken = (cond == 4'hE) || (cond == 4'h0 && m_z[k]) || (cond == 4'h1 && !m_z[k]);
        if (cond == 4'hE) n_b_always++;
        else if (taken) n_br_taken++;
        else n_br_untaken++;
        if (taken) m_pc[k] = m_pc[k] + 8 + 32'($signed({ins[23:0], 2'b00}));
        else m_pc[k] = m_pc[k] + 4;
      end
    endcase
  endtask

  task automatic model_commit(input int k);
    if (m_regwe[k]) m_r[k][m_rd[k]] = m_val[k];
    if (m_memwe[k]) m_mem[k][(m_addr[k] / 4) % 64] = m_val[k];
  endtask

  initial begin
    repeat (400) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cycles;
    rst = 0; #1; rst = 1;
    for (int k = 0; k < NDUT; k++) begin
      m_pc[k] = 0; m_z[k] = 0;
      for (int i = 0; i < 16; i++) m_r[k][i] = 0;
      for (int i = 0; i < 64; i++) m_mem[k][i] = 0;
    end
    #12;
    for (int k = 0; k < NDUT; k++) chk(pcq[k] == 0, "PC is 0 after reset");
    @(negedge clk); rst = 0;
    // one instruction per clock: compare the DUT's writes with the model's on each cycle
    for (cycles = 0; cycles < 120; cycles++) begin
      for (int k = 0; k < NDUT; k++) begin
        chk(pcq[k] == m_pc[k], $sformatf("dut%0d cycle %0d PC %h exp %h", k, cycles, pcq[k], m_pc[k]));
        chk(pc4[k] == m_pc[k] + 4, $sformatf("dut%0d PC4", k));
        model_step(k);
        chk(regwr[k] == m_regwe[k] && memwr[k] == m_memwe[k],
            $sformatf("dut%0d cycle %0d write enables regwr %b memwr %b exp %b %b", k, cycles, regwr[k], memwr[k], m_regwe[k], m_memwe[k]));
        if (m_regwe[k]) chk(wd3[k] == m_val[k], $sformatf("dut%0d cycle %0d WD3 %h exp %h", k, cycles, wd3[k], m_val[k]));
        if (m_memwe[k]) chk(memaddr[k] == m_addr[k] && memdata[k] == m_val[k], $sformatf("dut%0d store", k));
        chk(pcq[k] + 4 == pc4[k], "PC4 = PC + 4");
      end
      @(posedge clk); #1;
      for (int k = 0; k < NDUT; k++) model_commit(k);
      @(negedge clk);
    end
    // architectural results, worked out by hand from the two programs
    chk(dut0.u_decode.u_regfile.r[8] == 0, "sumn: i = 0");
    chk(dut0.u_decode.u_regfile.r[9] == 55, "sumn: sum = 55");
    chk(dut0.u_decode.u_regfile.r[10] == 32, "sumn: R10 = 55 AND -32 = 32");
    chk(dut0.u_decode.u_regfile.r[11] == 1 && dut0.u_decode.u_regfile.r[12] == 4, "sumn: R11, R12");
    chk(dut0.u_dmem.mem[1] == 1, "sumn: memory[4] = 1");
    chk(dut0.u_decode.u_regfile.r[6] == 1, "sumn: R6 = memory[4]");
    chk(pcq[0] == 32'h40 || pcq[0] == 32'h44, "sumn: spinning in done loop");
    chk(dut1.u_decode.u_regfile.r[1] == 32'hFF000000, "p2: rotated immediate 0xFF ror 8");
    chk(dut1.u_decode.u_regfile.r[2] == 32'h000003F0, "p2: rotated immediate 0x3F ror 28");
    chk(dut1.u_decode.u_regfile.r[3] == 32'hFF0003F0, "p2: ORR");
    chk(dut1.u_decode.u_regfile.r[4] == 32'hFF0003FF, "p2: EOR");
    chk(dut1.u_decode.u_regfile.r[5] == 32'h3FF && dut1.u_decode.u_regfile.r[6] == 32'h3FF, "p2: SUB, MOV reg");
    chk(dut1.u_dmem.mem[10] == 32'h3FF && dut1.u_decode.u_regfile.r[8] == 32'h3FF, "p2: STR/LDR at 0x28");
    chk(dut1.u_decode.u_regfile.r[9] == 0, "p2: BEQ skipped MOV R9");
    chk(dut1.u_decode.u_regfile.r[11] == 0, "p2: no branch to fail");
    chk(dut1.u_decode.u_regfile.r[10] == 32'hF0, "p2: ADD then AND");
    chk(pcq[1] == 32'h44, "p2: at end loop");
    chk(dut2.u_decode.u_regfile.r[9] == 15, "sumn n=5: sum = 15");
    chk(dut2.u_decode.u_regfile.r[10] == 0 && dut2.u_decode.u_regfile.r[11] == 0, "sumn n=5: 15 AND -32 = 0, store path skipped");
    chk(dut2.u_dmem.mem[1] == 0 && dut2.u_decode.u_regfile.r[6] == 0, "sumn n=5: memory[4] stays 0");
    chk(dut3.u_decode.u_regfile.r[9] == 0 && dut3.u_decode.u_regfile.r[10] == 0, "sumn n=0: loop and test skipped");
    chk(dut3.u_dmem.mem[1] == 0, "sumn n=0: no store");
    chk(n_str == 2, $sformatf("exactly two stores in all runs, saw %0d", n_str));
    $display("mechanisms: taken=%0d untaken=%0d always=%0d cmp=%0d ldr=%0d str=%0d rot=%0d regop=%0d immop=%0d",
             n_br_taken, n_br_untaken, n_b_always, n_cmp, n_ldr, n_str, n_rot, n_regop, n_immop);
    chk(n_br_taken > 0, "a conditional branch was taken");
    chk(n_br_untaken > 0, "a conditional branch fell through");
    chk(n_b_always > 0, "an unconditional branch ran");
    chk(n_cmp > 0, "CMP wrote the flags");
    chk(n_ldr > 0, "a load ran");
    chk(n_str > 0, "a store ran");
    chk(n_rot > 0, "a non-zero immediate rotate ran");
    chk(n_regop > 0 && n_immop > 0, "register and immediate operands ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
