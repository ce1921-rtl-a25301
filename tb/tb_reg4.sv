// tb_reg4: self-checking test of the 4-bit flag register: asynchronous reset to zero, load
// on the rising edge when LD is high, hold otherwise.
module tb_reg4;
  logic [3:0] d, q, model;
  logic ld, rst, clk = 0;
  int checks = 0, failures = 0;
  reg4 dut (.D(d), .LD(ld), .RST(rst), .CLK(clk), .Q(q));
  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 0; #1; rst = 1; ld = 1; d = 4'hF; #2;
    checks++; if (q != 0) failures++;
    @(negedge clk); rst = 0; model = 0;
    for (int i = 0; i < 300; i++) begin
      d = 4'($urandom); ld = 1'($urandom);
      @(posedge clk); #1;
      if (ld) model = d;
      checks++;
      if (q != model) begin failures++; $display("FAIL q=%h exp %h", q, model); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
