// tb_htpt_top: end-to-end test of the top at its default parameters.
//
// Data path: applies complete two-pattern test plans through the primary
// inputs only and checks each response at a primary output:
//   * R1-MUX3-MUX5-MULT-R5: PI1-R1 and PI2-MUX1-R2 (disjoint control paths).
//   * R3-MUX4-ADD-MUX2-R3 (R3 feeds back into ADD): R3 loaded through the
//     test MUX from PI2, R1 from PI1; the captured sum is observed through
//     MULT acting as a thru function, its other input R2 = 1 being loaded
//     beforehand and held (support path plus hold).
//   * R4-MUX4-ADD-MUX6-R4: R4 loaded through the same test MUX, observed at
//     PO1.
//   * R3-MUX3-MUX5-MULT-R5: R3 loaded via PI1-R1-ADD-MUX2-R3 with the thru
//     mask forcing ADD's other input to 0, R2 via PI2 in the same clocks.
// In every plan the vector pair must arrive in consecutive clocks and the
// response is captured in the clock after the second vector.
// Control-path pairs: runs the condition-3 and condition-4 schedules and
// checks that (v11, v12) and (v21, v22) reach the end points in the listed
// clocks. Global REFF register: loads (v1, v2) in normal mode and checks it
// replays them alternately in test mode.
// Each mechanism (test MUX, thru mask, support path, hold, hold-register
// schedule, REFF rotation) is counted; one that never happened is a failure.
module tb_htpt_top;
  import htpt_pkg::*;
  localparam int unsigned W = DP_WIDTH;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int n_test_mux = 0, n_mask = 0, n_support = 0, n_hold = 0;
  int n_sched_c = 0, n_sched_d = 0, n_reff_rot = 0, n_plans = 0;

  logic [W-1:0] dp_pi1 = '0, dp_pi2 = '0, dp_po1, dp_po2;
  dp_ctrl_t     dp_ctrl = DP_CTRL_IDLE;
  logic [W-1:0] cpc_mp = '0, cpd_mp = '0;
  logic [4:0]   cpc_ld1 = '1, cpc_ld2 = '1;
  logic [2:0]   cpd_ld1 = '1;
  logic [3:0]   cpd_ld2 = '1;
  logic [4:0][W-1:0] cpc_c1_q, cpc_c2_q;
  logic [2:0][W-1:0] cpd_c1_q;
  logic [3:0][W-1:0] cpd_c2_q;
  logic [W-1:0] cpc_ep1, cpc_ep2, cpd_ep1, cpd_ep2;
  logic         greff_test_mode = 0;
  logic [W-1:0] greff_pi = '0, greff_q, greff_q_b;

  htpt_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  // One data path clock: apply control and PIs, wait for the edge.
  task automatic dp_cycle(input dp_ctrl_t c, input logic [W-1:0] p1, input logic [W-1:0] p2);
    @(negedge clk);
    dp_ctrl = c; dp_pi1 = p1; dp_pi2 = p2;
    @(posedge clk); #1;
    if (c.tmux_sel && (c.ld[R3] || c.ld[R4])) n_test_mux++;
    if (c.add_mask && c.ld[R3]) n_mask++;
  endtask

  task automatic plan_r1_mult();
    dp_ctrl_t c;
    logic [W-1:0] v11 = W'($urandom), v21 = W'($urandom), v12 = W'($urandom), v22 = W'($urandom);
    c = DP_CTRL_IDLE; c.ld[R1] = 1; c.ld[R2] = 1;
    dp_cycle(c, v11, v12);
    dp_cycle(c, v21, v22);
    c = DP_CTRL_IDLE; c.ld[R5] = 1;
    dp_cycle(c, '0, '0);
    chk("R1-MUX3-MUX5-MULT-R5 response at PO2", dp_po2, W'(v21 * v22));
    n_plans++;
  endtask

  task automatic plan_r3_add_fr();
    dp_ctrl_t c;
    logic [W-1:0] v11 = W'($urandom), v21 = W'($urandom), v12 = W'($urandom), v22 = W'($urandom);
    // Support value for the MULT thru function: R2 = 1, then held.
    c = DP_CTRL_IDLE; c.ld[R2] = 1;
    dp_cycle(c, '0, 16'd1);
    n_support++;
    // Vector pair: R3 through the test MUX from PI2, R1 from PI1.
    c = DP_CTRL_IDLE; c.ld[R1] = 1; c.ld[R3] = 1; c.tmux_sel = 1;
    dp_cycle(c, v12, v11);
    dp_cycle(c, v22, v21);
    // Capture: R3 <= R1 + R3.
    c = DP_CTRL_IDLE; c.ld[R3] = 1; c.mux4_sel = 0;
    dp_cycle(c, W'($urandom), W'($urandom));
    // Observe: R3 -> MUX3 -> MUX5 -> MULT (x R2 = 1) -> R5 -> PO2.
    c = DP_CTRL_IDLE; c.ld[R5] = 1; c.mux3_sel = 1;
    dp_cycle(c, W'($urandom), W'($urandom));
    n_hold++;   // R2 kept its support value for four clocks
    chk("R3-MUX4-ADD-MUX2-R3 response at PO2", dp_po2, W'(v21 + v22));
    n_plans++;
  endtask

  task automatic plan_r4_add_fr();
    dp_ctrl_t c;
    logic [W-1:0] v11 = W'($urandom), v21 = W'($urandom), v12 = W'($urandom), v22 = W'($urandom);
    c = DP_CTRL_IDLE; c.ld[R1] = 1; c.ld[R4] = 1; c.tmux_sel = 1;
    dp_cycle(c, v12, v11);
    dp_cycle(c, v22, v21);
    c = DP_CTRL_IDLE; c.ld[R4] = 1; c.mux4_sel = 1;
    dp_cycle(c, W'($urandom), W'($urandom));
    chk("R4-MUX4-ADD-MUX6-R4 response at PO1", dp_po1, W'(v21 + v22));
    n_plans++;
  endtask

  task automatic plan_r3_mult_masked();
    dp_ctrl_t c;
    logic [W-1:0] v11 = W'($urandom), v21 = W'($urandom), v12 = W'($urandom), v22 = W'($urandom);
    // Make sure ADD's right input is not already 0: load R3 with a non-zero value.
    c = DP_CTRL_IDLE; c.ld[R3] = 1; c.tmux_sel = 1;
    dp_cycle(c, '0, W'($urandom) | 16'h0001);
    c = DP_CTRL_IDLE; c.ld[R1] = 1;
    dp_cycle(c, v11, '0);
    c = DP_CTRL_IDLE; c.ld[R1] = 1; c.ld[R3] = 1; c.ld[R2] = 1; c.add_mask = 1;
    dp_cycle(c, v21, v12);
    c = DP_CTRL_IDLE; c.ld[R3] = 1; c.ld[R2] = 1; c.add_mask = 1;
    dp_cycle(c, W'($urandom), v22);
    c = DP_CTRL_IDLE; c.ld[R5] = 1; c.mux3_sel = 1;
    dp_cycle(c, '0, '0);
    chk("R3-MUX3-MUX5-MULT-R5 response at PO2", dp_po2, W'(v21 * v22));
    n_plans++;
  endtask

  // condition-3 schedule through the top's ports.
  task automatic sched_c();
    logic [W-1:0] v11 = W'($urandom), v21 = W'($urandom), v12 = W'($urandom), v22 = W'($urandom);
    logic [W-1:0] mp_seq [0:7];
    mp_seq = '{v11, v21, v12, v22, W'($urandom), W'($urandom), W'($urandom), W'($urandom)};
    for (int k = 1; k <= 8; k++) begin
      @(negedge clk);
      cpc_mp = mp_seq[k-1];
      cpc_ld1 = '1;
      if (k == 4 || k == 5) cpc_ld1[1] = 1'b0;
      if (k == 5 || k == 6) cpc_ld1[3] = 1'b0;
      @(posedge clk); #1;
      if (k == 7) begin chk("schedule 3 clock 7 EP1", cpc_ep1, v11); chk("schedule 3 clock 7 EP2", cpc_ep2, v12); end
      if (k == 8) begin chk("schedule 3 clock 8 EP1", cpc_ep1, v21); chk("schedule 3 clock 8 EP2", cpc_ep2, v22); end
    end
    n_sched_c++;
  endtask

  // condition-4 schedule through the top's ports.
  task automatic sched_d();
    logic [W-1:0] v11 = W'($urandom), v21 = W'($urandom), v12 = W'($urandom), v22 = W'($urandom);
    logic [W-1:0] mp_seq [0:5];
    mp_seq = '{v11, v12, v22, v21, W'($urandom), W'($urandom)};
    for (int k = 1; k <= 6; k++) begin
      @(negedge clk);
      cpd_mp = mp_seq[k-1];
      cpd_ld1 = '1;
      if (k == 3 || k == 4) cpd_ld1[1] = 1'b0;
      @(posedge clk); #1;
      if (k == 5) begin chk("schedule 4 clock 5 EP1", cpd_ep1, v11); chk("schedule 4 clock 5 EP2", cpd_ep2, v12); end
      if (k == 6) begin chk("schedule 4 clock 6 EP1", cpd_ep1, v21); chk("schedule 4 clock 6 EP2", cpd_ep2, v22); end
    end
    n_sched_d++;
  endtask

  task automatic greff_replay();
    logic [W-1:0] v1 = W'($urandom), v2 = W'($urandom);
    @(negedge clk); greff_test_mode = 0; greff_pi = v1;
    @(negedge clk); greff_pi = v2;
    @(negedge clk); greff_test_mode = 1; greff_pi = W'($urandom);
    chk("REFF loaded v2", greff_q, v2);
    for (int i = 0; i < 6; i++) begin
      @(posedge clk); #1;
      chk("REFF replay", greff_q, (i % 2 == 0) ? v1 : v2);
      n_reff_rot++;
    end
    @(negedge clk); greff_test_mode = 0;
  endtask

  initial begin
    #12 rst_n = 1;
    for (int r = 0; r < 25; r++) begin
      plan_r1_mult();
      plan_r3_add_fr();
      plan_r4_add_fr();
      plan_r3_mult_masked();
      sched_c();
      sched_d();
      greff_replay();
    end
    $display("plans=%0d test_mux=%0d mask=%0d support=%0d hold=%0d table1=%0d table2=%0d reff_rot=%0d",
             n_plans, n_test_mux, n_mask, n_support, n_hold, n_sched_c, n_sched_d, n_reff_rot);
    checks += 8;
    if (n_plans == 0)    begin failures++; $display("no test plan applied"); end
    if (n_test_mux == 0) begin failures++; $display("test MUX never used"); end
    if (n_mask == 0)     begin failures++; $display("thru mask never used"); end
    if (n_support == 0)  begin failures++; $display("support path never used"); end
    if (n_hold == 0)     begin failures++; $display("hold never used"); end
    if (n_sched_c == 0)  begin failures++; $display("schedule 3 schedule never run"); end
    if (n_sched_d == 0)  begin failures++; $display("schedule 4 schedule never run"); end
    if (n_reff_rot == 0) begin failures++; $display("REFF never rotated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
