// tb_barrel: self-checking test of the immediate rotator. The expected value is built by
// rotating right one bit at a time, 2*rotate times, for every rotate value and random data.
module tb_barrel;
  logic [31:0] x, y, expv;
  logic [3:0] rot;
  int checks = 0, failures = 0;
  barrel #(.WIDTH(32)) dut (.in_src2(x), .rotate(rot), .out_src2(y));
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 640; i++) begin
      x = (i < 16) ? 32'h0000_00FF : $urandom; rot = 4'(i); #1;
      expv = x;
      for (int k = 0; k < 2 * int'(rot); k++) expv = {expv[0], expv[31:1]};
      checks++;
      if (y != expv) begin failures++; $display("FAIL x=%h rot=%0d got %h exp %h", x, rot, y, expv); end
    end
    x = 32'hFF; rot = 4; #1; checks++; if (y != 32'hFF00_0000) failures++;
    x = 32'h3F; rot = 14; #1; checks++; if (y != 32'h0000_03F0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
