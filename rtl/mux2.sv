// mux2: n-bit wide 2-to-1 multiplexer.
//
// Used both as an interconnect MUX of the data path and as the test MUX that
// the DFT method adds to create a direct path from a primary input. When
// `sel` picks one input, each output bit depends only on the same bit of that
// input, so a path through the MUX is n independent 1-bit paths and the other
// input is a don't care. Purely combinational; `sel` = 0 picks `in0` (the
// select encoding is this design's choice; the MUX itself follows the method).
module mux2 #(
  parameter int unsigned WIDTH = htpt_pkg::DP_WIDTH
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  output logic [WIDTH-1:0] y
);
  always_comb begin
    if (sel) y = in1;
    else     y = in0;
  end
endmodule
