// tb_regfile: self-checking test of the register file against an array model: reset clears
// all sixteen registers, random writes land on the rising edge only when REGWR is high, and
// both read ports return the addressed register combinationally.
module tb_regfile;
  logic [3:0] a1, a2, a3;
  logic [31:0] wd3, rd1, rd2;
  logic regwr, rst, clk = 0;
  logic [31:0] model [16];
  int checks = 0, failures = 0;
  regfile #(.WIDTH(32), .NREGS(16)) dut (.A1(a1), .A2(a2), .A3(a3), .WD3(wd3), .REGWR(regwr),
    .RST(rst), .CLK(clk), .RD1(rd1), .RD2(rd2));
  always #5 clk = ~clk;
  task automatic chk(input logic ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 0; #1; rst = 1; regwr = 0; a1 = 0; a2 = 0; a3 = 0; wd3 = 0; #2;
    for (int i = 0; i < 16; i++) begin
      a1 = 4'(i); a2 = 4'(15 - i); #1; chk(rd1 == 0 && rd2 == 0, $sformatf("reset r%0d", i));
    end
    for (int i = 0; i < 16; i++) model[i] = 0;
    @(negedge clk); rst = 0;
    // write every register once
    for (int i = 0; i < 16; i++) begin
      a3 = 4'(i); wd3 = $urandom; regwr = 1;
      @(posedge clk); #1; model[i] = wd3;
      @(negedge clk);
    end
    for (int i = 0; i < 600; i++) begin
      a1 = 4'($urandom); a2 = 4'($urandom); #1;
      chk(rd1 == model[a1], $sformatf("RD1 r%0d = %h exp %h", a1, rd1, model[a1]));
      chk(rd2 == model[a2], $sformatf("RD2 r%0d = %h exp %h", a2, rd2, model[a2]));
      a3 = 4'($urandom); wd3 = $urandom; regwr = 1'($urandom);
      @(posedge clk); #1;
      if (regwr) model[a3] = wd3;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
