// tb_alu: self-checking test of the ALU. Results and flags are worked out with 64-bit signed
// and unsigned arithmetic: C is the carry out of A+B, or A >= B for A-B; V is set when the
// mathematically exact signed result does not fit in 32 bits.
module tb_alu;
  import scp_pkg::*;
  logic [31:0] a, b, f, ef;
  logic [2:0] s;
  logic c, v, n, z, ec, ev;
  int checks = 0, failures = 0;
  alu #(.WIDTH(32)) dut (.A(a), .B(b), .S(s), .F(f), .C(c), .V(v), .N(n), .Z(z));
  task automatic try(input logic [31:0] x, input logic [31:0] y, input logic [2:0] op);
    longint sa, sb, exact;
    longint unsigned ua, ub;
    a = x; b = y; s = op; #1;
    sa = longint'($signed(x)); sb = longint'($signed(y));
    ua = longint'(x); ub = longint'(y);
    ec = 0; ev = 0;
    case (op)
      ALU_ADD: begin exact = sa + sb; ef = 32'(ua + ub); ec = (ua + ub) > 64'hFFFF_FFFF;
                     ev = exact != longint'($signed(ef)); end
      ALU_SUB: begin exact = sa - sb; ef = 32'(ua - ub); ec = ua >= ub;
                     ev = exact != longint'($signed(ef)); end
      ALU_AND: ef = x & y;
      ALU_ORR: ef = x | y;
      ALU_EOR: ef = x ^ y;
      ALU_PASSB: ef = y;
      default: ef = 0;
    endcase
    checks++;
    if (f != ef || c != ec || v != ev || n != ef[31] || z != (ef == 0)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h: f=%h c%b v%b n%b z%b, exp f=%h c%b v%b", op, x, y, f, c, v, n, z, ef, ec, ev);
    end
  endtask
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int op = 0; op < 8; op++) begin
      try(0, 0, 3'(op)); try(32'h7FFF_FFFF, 1, 3'(op)); try(32'h8000_0000, 1, 3'(op));
      try(32'hFFFF_FFFF, 1, 3'(op)); try(5, 5, 3'(op)); try(3, 10, 3'(op));
      for (int i = 0; i < 200; i++) try($urandom, (i % 4 == 0) ? 32'($urandom % 8) : $urandom, 3'(op));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
