// regfile: NREGS x WIDTH register file, two combinational read ports, one write port.
//
// RD1 = R[A1] and RD2 = R[A2] at all times. On a rising CLK edge with REGWR high, R[A3] takes
// WD3; a register written in a cycle is read with its new value from the next cycle on. RST
// (active high, asynchronous) clears every register. All sixteen registers are ordinary
// storage: unlike a full ARM core, R15 is not the PC here, because the branch address is
// formed outside the register file. The ports follow the document's decode schematic; the
// reset behaviour is this design's choice.
module regfile #(
  parameter int WIDTH = 32,
  parameter int NREGS = 16
) (
  input  logic [$clog2(NREGS)-1:0] A1,
  input  logic [$clog2(NREGS)-1:0] A2,
  input  logic [$clog2(NREGS)-1:0] A3,
  input  logic [WIDTH-1:0]         WD3,
  input  logic                     REGWR,
  input  logic                     RST,
  input  logic                     CLK,
  output logic [WIDTH-1:0]         RD1,
  output logic [WIDTH-1:0]         RD2
);
  logic [WIDTH-1:0] r [NREGS];

  always_ff @(posedge CLK or posedge RST) begin
    if (RST) begin
      for (int i = 0; i < NREGS; i++) r[i] <= '0;
    end else if (REGWR) begin
      r[A3] <= WD3;
    end
  end

  always_comb begin
    RD1 = r[A1];
    RD2 = r[A2];
  end
endmodule
