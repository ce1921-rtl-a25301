// tb_scp_full: the processor at its default configuration (sumn program in ROM, 64-word data
// memory) run from reset through the whole program. sumn takes 2 setup instructions, 10 loop
// passes of 6 instructions and 8 more up to the store, so the store to byte address 4 must
// happen on exactly the 70th clock after reset and the load of that word into R6 on the 71st;
// the program then spins in its final two-instruction loop.
module tb_scp_full;
  logic clk = 0, rst;
  logic [31:0] wd3, memaddr, memdata, pc4, instr, braddr, pcq;
  logic pcsrc, pcwr, regdst, regwr, alusrcb, cpsrwr, memwr, regsrc;
  logic [1:0] exts;
  logic [2:0] alus;
  logic [3:0] rotate;
  int checks = 0, failures = 0;
  int store_cycle = -1, load_cycle = -1, taken = 0;
  always #5 clk = ~clk;
  scp dut (.CLK(clk), .RST(rst), .WD3(wd3), .PCSRC(pcsrc), .PCWR(pcwr), .REGDST(regdst), .REGWR(regwr),
    .EXTS(exts), .ALUSRCB(alusrcb), .ALUS(alus), .CPSRWR(cpsrwr), .MEMWR(memwr), .REGSRC(regsrc),
    .ROTATE(rotate), .MEMADDR(memaddr), .MEMDATA(memdata), .PC4(pc4), .INSTR(instr), .BRADDR(braddr),
    .PC(pcq));
  task automatic chk(input logic ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask
  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    rst = 0; #1; rst = 1; #12;
    chk(pcq == 0 && instr == 32'hE3A0800A, "reset to the first instruction");
    @(negedge clk); rst = 0;
    for (int cyc = 1; cyc <= 90; cyc++) begin
      if (memwr) begin
        if (store_cycle < 0) store_cycle = cyc;
        chk(memaddr == 4 && memdata == 1, $sformatf("store of %h to %h", memdata, memaddr));
      end
      if (regwr && instr == 32'hE59C6000 && load_cycle < 0) load_cycle = cyc;
      if (pcsrc) taken++;
      @(negedge clk);
    end
    chk(store_cycle == 70, $sformatf("store on clock %0d, expected 70", store_cycle));
    chk(load_cycle == 71, $sformatf("load on clock %0d, expected 71", load_cycle));
    chk(dut.u_decode.u_regfile.r[9] == 55, "sum of 1..10 is 55");
    chk(dut.u_decode.u_regfile.r[8] == 0, "i counted down to 0");
    chk(dut.u_decode.u_regfile.r[6] == 1, "R6 read back memory[4] = 1");
    chk(dut.u_dmem.mem[1] == 1, "memory[4] = 1");
    chk(taken == 9 + 10, $sformatf("branches taken %0d, expected 9 BNE + 10 B", taken));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
