// tb_irom: self-checking test of the instruction ROM. Every word of the sumn program is read
// at its byte address and compared with the listing typed in here; the two low address bits
// must be ignored, and addresses past the program must read zero.
module tb_irom;
  logic [31:0] a, rd;
  int checks = 0, failures = 0;
  logic [31:0] expected [18] = '{
    32'hE3A0800A, 32'hE3A09000, 32'hE3580000, 32'h0A00000B, 32'hE0899008, 32'hE2488001,
    32'hE3580000, 32'h1AFFFFF9, 32'hE3A0A000, 32'hE24AA020, 32'hE009A00A, 32'hE35A0000,
    32'h0A000002, 32'hE3A0B001, 32'hE3A0C004, 32'hE58CB000, 32'hE59C6000, 32'hEAFFFFFD };
  irom dut (.A(a), .RD(rd));
  task automatic chk(input logic ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 18; i++) begin
      a = 32'(4 * i); #1;
      chk(rd == expected[i], $sformatf("addr %h read %h exp %h", a, rd, expected[i]));
      a = 32'(4 * i + 3); #1;
      chk(rd == expected[i], $sformatf("addr %h (unaligned) read %h", a, rd));
    end
    for (int i = 18; i < 40; i++) begin
      a = 32'(4 * i); #1; chk(rd == 0, $sformatf("addr %h past program read %h", a, rd));
    end
    a = 32'h8000_0000; #1; chk(rd == 0, "high address reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
