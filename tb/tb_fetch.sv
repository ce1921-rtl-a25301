// tb_fetch: self-checking test of the fetch stage. After reset the PC is 0 and the first
// sumn instruction is presented with PC+4 = 4 and PC+8 = 8; the PC then follows PCWD on each
// clock when PCWE is high and holds when it is low, and INSTR, PC4 and PC8 track it in the
// same cycle.
module tb_fetch;
  logic [31:0] pcwd, pc4, pc8, instr, pcq, model;
  logic pcwe, rst, clk = 0;
  int checks = 0, failures = 0;
  logic [31:0] prog [18] = '{
    32'hE3A0800A, 32'hE3A09000, 32'hE3580000, 32'h0A00000B, 32'hE0899008, 32'hE2488001,
    32'hE3580000, 32'h1AFFFFF9, 32'hE3A0A000, 32'hE24AA020, 32'hE009A00A, 32'hE35A0000,
    32'h0A000002, 32'hE3A0B001, 32'hE3A0C004, 32'hE58CB000, 32'hE59C6000, 32'hEAFFFFFD };
  fetch dut (.PCWD(pcwd), .PCWE(pcwe), .RST(rst), .CLK(clk), .PC4(pc4), .PC8(pc8),
             .INSTR(instr), .PC(pcq));
  always #5 clk = ~clk;
  task automatic chk(input logic ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic chk_outputs(input logic [31:0] p);
    chk(pcq == p, $sformatf("PC %h exp %h", pcq, p));
    chk(pc4 == p + 4, $sformatf("PC4 %h for PC %h", pc4, p));
    chk(pc8 == p + 8, $sformatf("PC8 %h for PC %h", pc8, p));
    chk(instr == ((p[31:2] < 18) ? prog[p[6:2]] : 32'h0), $sformatf("INSTR %h at PC %h", instr, p));
  endtask
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 0; #1; rst = 1; pcwe = 1; pcwd = 32'h40; #2;
    chk_outputs(0);
    chk(instr == 32'hE3A0800A, "first instruction after reset");
    @(negedge clk); rst = 0; model = 0;
    for (int i = 0; i < 200; i++) begin
      pcwd = (i % 3 == 0) ? model + 4 : {25'b0, 5'($urandom), 2'b00};
      pcwe = (i % 7 != 3);
      @(posedge clk); #1;
      if (pcwe) model = pcwd;
      chk_outputs(model);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
