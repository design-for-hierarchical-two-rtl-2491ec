// op_mult: multiplier operational module (MULT) of the example data path.
//
// Two-input combinational multiplier; the low WIDTH bits of the product are
// kept so the result fits the common bus width (this design's choice). With
// one input held at 1 it is a thru function from the other input.
module op_mult #(
  parameter int unsigned WIDTH = htpt_pkg::DP_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  always_comb y = a * b;
endmodule
