// tb_dmem: self-checking test of the data memory against an array model: reset clears every
// word, writes happen on the rising edge only when MEMWR is high, reads are combinational,
// the two low address bits are ignored and addresses wrap at the memory size.
module tb_dmem;
  localparam int WORDS = 64;
  logic [31:0] a, wd, rd;
  logic memwr, rst, clk = 0;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;
  dmem #(.WIDTH(32), .WORDS(WORDS)) dut (.A(a), .WD(wd), .MEMWR(memwr), .RST(rst), .CLK(clk), .RD(rd));
  always #5 clk = ~clk;
  task automatic chk(input logic ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 0; #1; rst = 1; memwr = 0; wd = 0; a = 0; #2;
    for (int i = 0; i < WORDS; i++) begin
      a = 32'(4 * i); #1; chk(rd == 0, $sformatf("reset word %0d", i)); model[i] = 0;
    end
    @(negedge clk); rst = 0;
    for (int i = 0; i < 1000; i++) begin
      a = $urandom; wd = $urandom; memwr = 1'($urandom); #1;
      chk(rd == model[(a / 4) % WORDS], $sformatf("read %h got %h", a, rd));
      @(posedge clk); #1;
      if (memwr) model[(a / 4) % WORDS] = wd;
      @(negedge clk);
    end
    a = 32'h4; wd = 1; memwr = 1; @(posedge clk); #1; memwr = 0;
    a = 32'h7; #1; chk(rd == 1, "byte address 7 reads word 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
