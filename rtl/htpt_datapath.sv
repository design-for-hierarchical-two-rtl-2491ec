// htpt_datapath: example data path made hierarchically two-pattern testable.
//
// The functional data path has two primary inputs (PI1, PI2), two primary
// outputs (PO1, PO2), five registers R1..R5, an adder ADD, a multiplier MULT,
// six 2-to-1 MUXes and a constant register K:
//
//   R1   <- PI1
//   R2   <- MUX1(PI2, MULT)
//   ADD   = R1 + MUX4(R3, R4)
//   R3   <- MUX2(ADD, K)
//   R4   <- MUX6(ADD, K)
//   MULT  = MUX5(MUX3(R1, R3), R4) * R2
//   R5   <- MULT
//   PO1   = R4,  PO2 = R5
//
// which has eighteen RTL paths of sequential depth one. R3 and R4 are
// feedback registers of ADD (accumulators that start from K), and the only
// ways to load them from a primary input run through ADD itself, so a thru
// function of ADD cannot deliver a vector pair to them. R2 is a feedback
// register of MULT but has its own direct path from PI2. The DFT method
// adds two elements:
//   * a test MUX on the ADD output, feeding both MUX2 and MUX6, that gives
//     PI2 a direct path to R3 and to R4 (one MUX serving two feedback
//     registers; PI2 is chosen because the other ADD input, R1, is loaded
//     from PI1, so the two control paths are disjoint);
//   * a thru mask on the right input of ADD that forces it to 0, so the
//     control path PI1-R1-ADD-MUX2-R3 can load R3 while PI2 loads R2 in the
//     same clocks (a support path from PI2 would conflict in time).
// The multiplier's thru function needs no mask: a 1 loaded into R1 or R2
// beforehand and held serves as its support path.
// Every register has a load enable (hold). All control inputs arrive in
// `ctrl` (see htpt_pkg) and are assumed directly controllable. With
// tmux_sel = 0 and add_mask = 0 the data path works as the original one.
//
// The element names, the paths the method names (PI1-R1, PI2-MUX1-R2,
// R1-MUX3-MUX5-MULT-R5, R2-MULT-R5, R1-ADD-MUX2-R3, R1-ADD-MUX6-R4,
// R3-MUX4-ADD-MUX6-R4, R5-PO2), MULT driving R2 and R5, and the shared test
// MUX from PI2 to R3 and R4 follow the method. The constant inputs of MUX2
// and MUX6, MUX3 = (R1, R3), MUX5 = (MUX3, R4), PO1 = R4, the mask position
// and the bus width are this design's choices, made so that the path
// count and control paths the method states hold. Timing: every
// register loads at the rising clock edge when its enable is high; POs are
// register outputs.
module htpt_datapath
  import htpt_pkg::*;
#(
  parameter int unsigned      WIDTH     = DP_WIDTH,
  parameter logic [WIDTH-1:0] CONST_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] pi1,
  input  logic [WIDTH-1:0] pi2,
  input  dp_ctrl_t         ctrl,
  output logic [WIDTH-1:0] po1,
  output logic [WIDTH-1:0] po2
);
  logic [WIDTH-1:0] r1_q, r2_q, r3_q, r4_q, r5_q;
  logic [WIDTH-1:0] mux1_y, mux2_y, mux3_y, mux4_y, mux5_y, mux6_y;
  logic [WIDTH-1:0] add_b, add_y, tmux_y, mult_y;
  logic [WIDTH-1:0] k_q;

  // Constant register: never loaded, its paths are not RTL paths to test.
  assign k_q = CONST_VAL;

  // Interconnect.
  mux2 #(.WIDTH(WIDTH)) u_mux1 (.sel(ctrl.mux1_sel), .in0(pi2),    .in1(mult_y), .y(mux1_y));
  mux2 #(.WIDTH(WIDTH)) u_mux4 (.sel(ctrl.mux4_sel), .in0(r3_q),   .in1(r4_q),   .y(mux4_y));
  mux2 #(.WIDTH(WIDTH)) u_mux3 (.sel(ctrl.mux3_sel), .in0(r1_q),   .in1(r3_q),   .y(mux3_y));
  mux2 #(.WIDTH(WIDTH)) u_mux5 (.sel(ctrl.mux5_sel), .in0(mux3_y), .in1(r4_q),   .y(mux5_y));
  mux2 #(.WIDTH(WIDTH)) u_mux2 (.sel(ctrl.mux2_sel), .in0(tmux_y), .in1(k_q),    .y(mux2_y));
  mux2 #(.WIDTH(WIDTH)) u_mux6 (.sel(ctrl.mux6_sel), .in0(tmux_y), .in1(k_q),    .y(mux6_y));

  // DFT: thru mask (ADD right input forced to 0) and test MUX from PI2.
  thru_mask #(.WIDTH(WIDTH), .MASK_VALUE('0)) u_add_mask (
    .mask_en(ctrl.add_mask), .d(mux4_y), .y(add_b)
  );
  mux2 #(.WIDTH(WIDTH)) u_tmux (.sel(ctrl.tmux_sel), .in0(add_y), .in1(pi2), .y(tmux_y));

  // Operational modules.
  op_add  #(.WIDTH(WIDTH)) u_add  (.a(r1_q),   .b(add_b), .y(add_y));
  op_mult #(.WIDTH(WIDTH)) u_mult (.a(mux5_y), .b(r2_q),  .y(mult_y));

  // Registers.
  hold_reg #(.WIDTH(WIDTH)) u_r1 (.clk, .rst_n, .ld(ctrl.ld[R1]), .d(pi1),    .q(r1_q));
  hold_reg #(.WIDTH(WIDTH)) u_r2 (.clk, .rst_n, .ld(ctrl.ld[R2]), .d(mux1_y), .q(r2_q));
  hold_reg #(.WIDTH(WIDTH)) u_r3 (.clk, .rst_n, .ld(ctrl.ld[R3]), .d(mux2_y), .q(r3_q));
  hold_reg #(.WIDTH(WIDTH)) u_r4 (.clk, .rst_n, .ld(ctrl.ld[R4]), .d(mux6_y), .q(r4_q));
  hold_reg #(.WIDTH(WIDTH)) u_r5 (.clk, .rst_n, .ld(ctrl.ld[R5]), .d(mult_y), .q(r5_q));

  assign po1 = r4_q;
  assign po2 = r5_q;
endmodule
