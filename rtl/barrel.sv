// barrel: immediate rotator.
//
// out_src2 is in_src2 rotated right by 2*rotate bit positions, the ARMv4 rule for a
// data-processing immediate (an 8-bit value rotated right by an even amount). A rotate of
// zero passes the value through, which the controller selects for all other instructions.
// Combinational. The document names the block and its ports; the rotation rule is ARMv4's.
module barrel #(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] in_src2,
  input  logic [3:0]       rotate,
  output logic [WIDTH-1:0] out_src2
);
  logic [2*WIDTH-1:0] doubled;
  logic [5:0]         amount;
  always_comb begin
    amount   = {1'b0, rotate, 1'b0};
    doubled  = {in_src2, in_src2} >> amount;
    out_src2 = doubled[WIDTH-1:0];
  end
endmodule
