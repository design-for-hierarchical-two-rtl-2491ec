// op_add: adder operational module (ADD) of the example data path.
//
// Two-input combinational adder on the data path width; the carry out is
// dropped so the result fits the common bus width (this design's choice).
// With one input held at 0 it is a thru function from the other input.
module op_add #(
  parameter int unsigned WIDTH = htpt_pkg::DP_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);
  always_comb y = a + b;
endmodule
