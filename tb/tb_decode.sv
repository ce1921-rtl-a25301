// tb_decode: self-checking test of the decode stage. Registers are loaded through WD3 with
// the destination taken from INSTR[15:12]; then random instructions check RD1 = R[Rn],
// RD2 = R[Rm] or R[Rd] as REGDST selects, IMM32 = the extended immediate rotated right by
// 2*ROTATE, and BRADDR = PC8 + the extended immediate, all worked out arithmetically here.
module tb_decode;
  logic [31:0] pc8, instr, wd3, braddr, rd1, rd2, imm32;
  logic regdst, regwr, rst, clk = 0;
  logic [1:0] exts;
  logic [3:0] rotate;
  logic [31:0] model [16];
  int checks = 0, failures = 0;
  decode dut (.PC8(pc8), .INSTR(instr), .WD3(wd3), .REGDST(regdst), .REGWR(regwr), .EXTS(exts),
    .ROTATE(rotate), .RST(rst), .CLK(clk), .BRADDR(braddr), .RD1(rd1), .RD2(rd2), .IMM32(imm32));
  always #5 clk = ~clk;
  task automatic chk(input logic ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  function automatic logic [31:0] ext_of(input logic [31:0] ins, input logic [1:0] mode);
    int v24;
    case (mode)
      2'b00: return 32'(ins % 256);
      2'b01: return 32'(ins % 4096);
      2'b10: begin v24 = int'(ins % 32'h100_0000); if (v24 >= 8388608) v24 -= 16777216; return 32'(v24 * 4); end
      default: return 0;
    endcase
  endfunction
  function automatic logic [31:0] ror2(input logic [31:0] v, input int r);
    logic [31:0] t = v;
    for (int k = 0; k < 2 * r; k++) t = {t[0], t[31:1]};
    return t;
  endfunction
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 0; #1; rst = 1; regwr = 0; regdst = 0; exts = 0; rotate = 0; pc8 = 8; instr = 0; wd3 = 0; #2;
    chk(rd1 == 0 && rd2 == 0, "registers clear after reset");
    @(negedge clk); rst = 0;
    for (int i = 0; i < 16; i++) begin
      instr = 32'(i) << 12; wd3 = $urandom; regwr = 1;
      @(posedge clk); #1; model[i] = wd3; @(negedge clk);
    end
    regwr = 0;
    for (int i = 0; i < 500; i++) begin
      instr = $urandom; regdst = 1'($urandom); exts = 2'(i % 3); rotate = 4'($urandom);
      pc8 = $urandom; #1;
      chk(rd1 == model[instr[19:16]], $sformatf("RD1 %h", rd1));
      chk(rd2 == model[regdst ? instr[15:12] : instr[3:0]], $sformatf("RD2 %h regdst %b", rd2, regdst));
      chk(imm32 == ror2(ext_of(instr, exts), int'(rotate)), $sformatf("IMM32 %h instr %h exts %0d rot %0d", imm32, instr, exts, rotate));
      chk(braddr == pc8 + ext_of(instr, exts), $sformatf("BRADDR %h", braddr));
      // write-back with REGWR randomly on
      wd3 = $urandom; regwr = 1'($urandom);
      @(posedge clk); #1; if (regwr) model[instr[15:12]] = wd3; @(negedge clk); regwr = 0;
    end
    // sumn BEQ at 0x0C: PC8 = 0x14, offset 0xB words -> 0x40
    instr = 32'h0A00000B; exts = 2'b10; rotate = 0; pc8 = 32'h14; #1;
    chk(braddr == 32'h40, "BEQ done target");
    instr = 32'h1AFFFFF9; pc8 = 32'h24; #1;
    chk(braddr == 32'h08, "BNE loop target");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
