// tb_execute: self-checking test of the execute stage. F must be RD1 op (RD2 or IMM32, as
// ALUSRCB selects), computed here with wide integer arithmetic; the stored C, V, N, Z must
// take the new flags one clock after CPSRWR is high and keep their value otherwise.
module tb_execute;
  import scp_pkg::*;
  logic [31:0] rd1, rd2, imm, f, ef, bsel;
  logic alusrcb, cpsrwr, rst, clk = 0;
  logic [2:0] alus;
  logic c, v, n, z;
  logic [3:0] flags, nflags;
  int checks = 0, failures = 0;
  execute dut (.RD1(rd1), .RD2(rd2), .IMM32(imm), .ALUSRCB(alusrcb), .ALUS(alus), .CPSRWR(cpsrwr),
    .RST(rst), .CLK(clk), .F(f), .C(c), .V(v), .N(n), .Z(z));
  always #5 clk = ~clk;
  task automatic chk(input logic ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [2:0] ops [6] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_ORR, ALU_EOR, ALU_PASSB};
    longint exact;
    logic ec, ev;
    rst = 0; #1; rst = 1; cpsrwr = 0; alusrcb = 0; alus = 0; rd1 = 0; rd2 = 0; imm = 0; #2;
    chk({c, v, n, z} == 0, "flags clear after reset");
    @(negedge clk); rst = 0; flags = 0;
    for (int i = 0; i < 600; i++) begin
      rd1 = (i % 5 == 0) ? rd2 : $urandom; rd2 = $urandom; imm = (i % 5 == 0) ? rd1 : 32'($urandom % 256);
      alusrcb = 1'($urandom); alus = ops[$urandom % 6]; cpsrwr = 1'($urandom); #1;
      bsel = alusrcb ? rd2 : imm;
      ec = 0; ev = 0;
      case (alus)
        ALU_ADD: begin ef = rd1 + bsel; ec = (longint'(rd1) + longint'(bsel)) > 64'hFFFF_FFFF;
                 exact = longint'($signed(rd1)) + longint'($signed(bsel)); ev = exact != longint'($signed(ef)); end
        ALU_SUB: begin ef = rd1 - bsel; ec = rd1 >= bsel;
                 exact = longint'($signed(rd1)) - longint'($signed(bsel)); ev = exact != longint'($signed(ef)); end
        ALU_AND: ef = rd1 & bsel;
        ALU_ORR: ef = rd1 | bsel;
        ALU_EOR: ef = rd1 ^ bsel;
        default: ef = bsel;
      endcase
      chk(f == ef, $sformatf("F %h exp %h (alus %0d srcb %b)", f, ef, alus, alusrcb));
      chk({c, v, n, z} == flags, "stored flags unchanged before the edge");
      nflags = {ec, ev, ef[31], ef == 0};
      @(posedge clk); #1;
      if (cpsrwr) flags = nflags;
      chk({c, v, n, z} == flags, $sformatf("flags %b exp %b", {c, v, n, z}, flags));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
