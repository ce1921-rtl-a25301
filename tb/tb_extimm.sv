// tb_extimm: self-checking test of the immediate extender. Expected values are computed
// arithmetically: the 8- and 12-bit fields as unsigned numbers, the 24-bit branch field as
// a signed number times four.
module tb_extimm;
  import scp_pkg::*;
  logic [23:0] imm;
  logic [1:0] exts;
  logic [31:0] imm32, expv;
  int checks = 0, failures = 0;
  extimm dut (.IMM(imm), .EXTS(exts), .IMM32(imm32));
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 800; i++) begin
      imm = (i < 4) ? 24'hFFFFFF : 24'($urandom);
      exts = 2'(i);
      #1;
      case (exts)
        2'b00: expv = 32'(int'(imm) % 256);
        2'b01: expv = 32'(int'(imm) % 4096);
        2'b10: expv = 32'((int'(imm) >= 8388608 ? int'(imm) - 16777216 : int'(imm)) * 4);
        default: expv = 0;
      endcase
      checks++;
      if (imm32 != expv) begin failures++; $display("FAIL exts=%0d imm=%h got %h exp %h", exts, imm, imm32, expv); end
    end
    // branch offsets of the sumn program
    imm = 24'h00000B; exts = EXT_BR24; #1; checks++; if (imm32 != 32'h2C) failures++;
    imm = 24'hFFFFF9; exts = EXT_BR24; #1; checks++; if (imm32 != 32'hFFFFFFE4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
