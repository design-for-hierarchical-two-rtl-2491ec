// thru_mask: mask element that realizes a thru function.
//
// A thru function carries a value unchanged from one input of an operational
// module to its output. For an adder or a multiplier that needs the identity
// constant (0 or 1) at the other input. When no support path can supply that
// constant without a timing conflict, this mask is placed on the other input:
// with `mask_en` high it replaces the operand by MASK_VALUE, otherwise it
// passes the operand on. Combinational. The mask as an override-to-constant
// gate is this design's reading of the method's "mask".
module thru_mask #(
  parameter int unsigned      WIDTH      = htpt_pkg::DP_WIDTH,
  parameter logic [WIDTH-1:0] MASK_VALUE = '0
) (
  input  logic             mask_en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] y
);
  always_comb begin
    if (mask_en) y = MASK_VALUE;
    else         y = d;
  end
endmodule
