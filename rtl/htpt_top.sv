// htpt_top: the hierarchically two-pattern testable designs side by side.
//
//   * u_dp:   the HTPT example data path (two PIs, two POs, R1..R5, ADD,
//             MULT, six MUXes, plus a test MUX and a thru mask).
//   * u_cp_c: two control paths from a merging point with two hold registers
//             on one of them (condition-3 example).
//   * u_cp_d: two control paths whose depths differ by one, the shallower
//             one crossing a hold register (condition-4 example).
//   * u_greff: a global REFF register, the extra two-pattern source the
//             method adds to a single-input data path: loaded from its PI in
//             normal mode, it then replays the stored vector pair forever in
//             test mode.
// The four parts share only clock and reset; each has its own primary
// inputs and outputs. The grouping is this design's choice; each part
// follows its own module's description.
module htpt_top
  import htpt_pkg::*;
#(
  parameter int unsigned WIDTH = DP_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  // HTPT example data path
  input  logic [WIDTH-1:0] dp_pi1,
  input  logic [WIDTH-1:0] dp_pi2,
  input  dp_ctrl_t         dp_ctrl,
  output logic [WIDTH-1:0] dp_po1,
  output logic [WIDTH-1:0] dp_po2,
  // condition-3 control-path pair
  input  logic [WIDTH-1:0] cpc_mp,
  input  logic [4:0]       cpc_ld1,
  input  logic [4:0]       cpc_ld2,
  output logic [4:0][WIDTH-1:0] cpc_c1_q,
  output logic [4:0][WIDTH-1:0] cpc_c2_q,
  output logic [WIDTH-1:0] cpc_ep1,
  output logic [WIDTH-1:0] cpc_ep2,
  // condition-4 control-path pair
  input  logic [WIDTH-1:0] cpd_mp,
  input  logic [2:0]       cpd_ld1,
  input  logic [3:0]       cpd_ld2,
  output logic [2:0][WIDTH-1:0] cpd_c1_q,
  output logic [3:0][WIDTH-1:0] cpd_c2_q,
  output logic [WIDTH-1:0] cpd_ep1,
  output logic [WIDTH-1:0] cpd_ep2,
  // global REFF register
  input  logic             greff_test_mode,
  input  logic [WIDTH-1:0] greff_pi,
  output logic [WIDTH-1:0] greff_q,
  output logic [WIDTH-1:0] greff_q_b
);
  htpt_datapath #(.WIDTH(WIDTH)) u_dp (
    .clk, .rst_n, .pi1(dp_pi1), .pi2(dp_pi2), .ctrl(dp_ctrl), .po1(dp_po1), .po2(dp_po2)
  );

  cpath_pair #(.WIDTH(WIDTH), .N1(5), .N2(5), .HOLD1(5'b01010), .HOLD2(5'b00000)) u_cp_c (
    .clk, .rst_n, .mp(cpc_mp), .ld1(cpc_ld1), .ld2(cpc_ld2),
    .c1_q(cpc_c1_q), .c2_q(cpc_c2_q), .ep1(cpc_ep1), .ep2(cpc_ep2)
  );

  cpath_pair #(.WIDTH(WIDTH), .N1(3), .N2(4), .HOLD1(3'b010), .HOLD2(4'b0000)) u_cp_d (
    .clk, .rst_n, .mp(cpd_mp), .ld1(cpd_ld1), .ld2(cpd_ld2),
    .c1_q(cpd_c1_q), .c2_q(cpd_c2_q), .ep1(cpd_ep1), .ep2(cpd_ep2)
  );

  reff_reg #(.WIDTH(WIDTH)) u_greff (
    .clk, .rst_n, .test_mode(greff_test_mode), .d(greff_pi), .q(greff_q), .q_b(greff_q_b)
  );
endmodule
