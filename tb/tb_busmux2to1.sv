// tb_busmux2to1: self-checking test of the 32-bit 2:1 bus multiplexer with random data.
module tb_busmux2to1;
  logic [31:0] d1, d0, y;
  logic s;
  int checks = 0, failures = 0;
  busmux2to1 #(.WIDTH(32)) dut (.D1(d1), .D0(d0), .S(s), .Y(y));
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 400; i++) begin
      d1 = $urandom; d0 = $urandom; s = 1'(i); #1;
      checks++;
      if (s && y != d1 || !s && y != d0) begin failures++; $display("FAIL s=%b y=%h", s, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
