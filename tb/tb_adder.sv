// tb_adder: self-checking test of the adder against 64-bit integer sums truncated to the
// adder width, over corner cases and random operands. Combinational; no clock.
module tb_adder;
  logic [31:0] a, b, s;
  int checks = 0, failures = 0;
  adder #(.WIDTH(32)) dut (.A(a), .B(b), .S(s));
  task automatic try(input logic [31:0] x, input logic [31:0] y);
    longint unsigned ref_sum;
    a = x; b = y; #1;
    ref_sum = longint'(x) + longint'(y);
    checks++;
    if (s !== ref_sum[31:0]) begin
      failures++; $display("FAIL %h + %h = %h, expected %h", x, y, s, ref_sum[31:0]);
    end
  endtask
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    try(0, 0); try(32'hFFFF_FFFF, 1); try(32'h7FFF_FFFF, 1); try(4, 32'h40); try(8, 32'hFFFF_FFF0);
    for (int i = 0; i < 500; i++) try($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
