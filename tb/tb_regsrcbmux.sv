// tb_regsrcbmux: exhaustive self-checking test of the 4-bit register source multiplexer.
module tb_regsrcbmux;
  logic [3:0] d1, d0, y;
  logic s;
  int checks = 0, failures = 0;
  regsrcbmux dut (.D1(d1), .D0(d0), .S(s), .Y(y));
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 512; i++) begin
      {s, d1, d0} = 9'(i); #1;
      checks++;
      if (y != (s ? d1 : d0)) begin failures++; $display("FAIL s=%b d1=%h d0=%h y=%h", s, d1, d0, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
