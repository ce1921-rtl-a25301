// tb_pc: self-checking test of the program counter register: asynchronous reset to zero,
// load on the rising clock edge when LD is high, hold when LD is low.
module tb_pc;
  logic [31:0] d, q, model;
  logic ld, rst, clk = 0;
  int checks = 0, failures = 0;
  pc #(.WIDTH(32)) dut (.D(d), .LD(ld), .RST(rst), .CLK(clk), .Q(q));
  always #5 clk = ~clk;
  task automatic chk(input logic ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 0; #1; rst = 1; ld = 1; d = 32'h1234; #2;
    chk(q == 0, "reset clears");
    @(negedge clk); chk(q == 0, "reset holds over clock edge");
    rst = 0; model = 0;
    for (int i = 0; i < 300; i++) begin
      d = $urandom; ld = 1'($urandom);
      @(posedge clk); #1;
      if (ld) model = d;
      chk(q == model, $sformatf("cycle %0d q=%h exp=%h", i, q, model));
    end
    @(negedge clk); rst = 1; #1; chk(q == 0, "asynchronous reset mid-cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
