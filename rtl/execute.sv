// execute: execute stage.
//
// The ALUSRCB multiplexer picks the ALU's B operand (1 = register value RD2, 0 = the
// extended immediate IMM32), the ALU computes F = RD1 op B as ALUS selects, and the ALU's
// C, V, N, Z are loaded into the flag register on the rising CLK edge when CPSRWR is high.
// F is combinational; the C, V, N, Z outputs are the stored flags, which the controller uses
// to decide conditional branches in later cycles. The structure and the ALUSRCB input order
// follow the document's execute schematic.
module execute #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] RD1,
  input  logic [WIDTH-1:0] RD2,
  input  logic [WIDTH-1:0] IMM32,
  input  logic             ALUSRCB,
  input  logic [2:0]       ALUS,
  input  logic             CPSRWR,
  input  logic             RST,
  input  logic             CLK,
  output logic [WIDTH-1:0] F,
  output logic             C,
  output logic             V,
  output logic             N,
  output logic             Z
);
  logic [WIDTH-1:0] srcb;
  logic             alu_c, alu_v, alu_n, alu_z;
  logic [3:0]       flags_q;

  busmux2to1 #(.WIDTH(WIDTH)) u_srcb_mux (.D1(RD2), .D0(IMM32), .S(ALUSRCB), .Y(srcb));

  alu #(.WIDTH(WIDTH)) u_alu (
    .A(RD1), .B(srcb), .S(ALUS), .F(F), .C(alu_c), .V(alu_v), .N(alu_n), .Z(alu_z)
  );

  reg4 u_flags (.D({alu_c, alu_v, alu_n, alu_z}), .LD(CPSRWR), .RST(RST), .CLK(CLK), .Q(flags_q));

  assign {C, V, N, Z} = flags_q;
endmodule
