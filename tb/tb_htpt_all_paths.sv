// tb_htpt_all_paths: every RTL path of the example data path gets a test plan.
//
// A data path is hierarchically two-pattern testable when each of its RTL
// paths (sequential depth one: PI->register, register->register,
// register->PO) has a test plan: control paths that bring a vector pair
// (v1 in one clock, v2 in the next) from the primary inputs to the start of
// the path and to the module's other input, and an observation path that
// takes the response to a primary output. This testbench runs such a plan,
// through the primary inputs and outputs only, for each of the 18 RTL paths
// of htpt_datapath at its default parameters:
//
//    1 PI1-R1                        7-9   {R1,R3,R4}-ADD-MUX2-R3
//    2 PI2-MUX1-R2                   10-12 {R1,R3,R4}-ADD-MUX6-R4
//  3-5 {R1,R3,R4}-MUX3/MUX5-MULT-    13-15 {R1,R3,R4}-MUX3/MUX5-MULT-R5
//      MUX1-R2                       16    R2-MULT-R5
//    6 R2-MULT-MUX1-R2               17    R4-PO1
//                                    18    R5-PO2
//
// Control paths used: PI1-R1; PI2-MUX1-R2; PI2-test MUX-MUX2-R3 and
// PI2-test MUX-MUX6-R4 (the added direct paths to the feedback registers);
// PI1-R1-ADD-MUX2-R3 and PI1-R1-ADD-MUX6-R4 with the thru mask on. The
// multiplier's thru function uses a support value 1 held in R1 or R2. For
// every plan the test checks that the captured response is the module's
// result on the second vector and prints how many clocks the plan took.
module tb_htpt_all_paths;
  import htpt_pkg::*;
  localparam int unsigned W = DP_WIDTH;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] pi1 = '0, pi2 = '0, po1, po2;
  dp_ctrl_t ctrl = DP_CTRL_IDLE;
  int checks = 0, failures = 0, cycles = 0, total_cycles = 0;
  bit tested [1:18];
  bit verbose = 1;      // print plan lengths in the first round only

  htpt_datapath dut (.clk, .rst_n, .pi1, .pi2, .ctrl, .po1, .po2);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cyc(input dp_ctrl_t c, input logic [W-1:0] p1, input logic [W-1:0] p2);
    @(negedge clk);
    ctrl = c; pi1 = p1; pi2 = p2;
    @(posedge clk); #1;
    cycles++;
  endtask

  task automatic chk(input int path, input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("path %0d %s: got %h expected %h", path, what, got, exp);
    end
  endtask

  function automatic logic [W-1:0] rnd();
    return W'($urandom);
  endfunction

  // Hold a support value of 1 in R1 or R2 (multiplier thru function).
  task automatic support_one(input int unsigned r);
    dp_ctrl_t c = DP_CTRL_IDLE;
    c.ld[r] = 1;
    cyc(c, 16'd1, 16'd1);
  endtask

  // ADD paths: R1 from PI1 and R3/R4 (right input) through the test MUX from
  // PI2, capture into end register e (R3 or R4), observe.
  task automatic add_plan(input int unsigned right, input int unsigned e, input int first_path);
    dp_ctrl_t c;
    logic [W-1:0] a1 = rnd(), a2 = rnd(), b1 = rnd(), b2 = rnd(), exp;
    if (e == R3) support_one(R2);
    cycles = 0;
    c = DP_CTRL_IDLE; c.ld[R1] = 1; c.ld[right] = 1; c.tmux_sel = 1;
    cyc(c, a1, b1);
    cyc(c, a2, b2);
    c = DP_CTRL_IDLE; c.ld[e] = 1; c.mux4_sel = (right == R4);
    cyc(c, rnd(), rnd());
    exp = a2 + b2;
    if (e == R4) chk(first_path, "PO1", po1, exp);
    else begin
      c = DP_CTRL_IDLE; c.ld[R5] = 1; c.mux3_sel = 1;    // R3 * R2(=1) -> R5
      cyc(c, rnd(), rnd());
      chk(first_path, "PO2", po2, exp);
    end
    // The plan covers R1 and the right-input register as path starts.
    tested[first_path] = 1;
    tested[first_path + (right == R3 ? 1 : 2)] = 1;
    total_cycles += cycles;
    if (verbose) $display("ADD plan R1,R%0d -> R%0d: %0d clocks", right + 1, e + 1, cycles);
  endtask

  // MULT paths: left register l (R1, R3 or R4) and R2, capture into e (R2 or
  // R5). A result in R2 is observed through MULT with R1 = 1, loaded from PI1
  // in the capture clock.
  task automatic mult_plan(input int unsigned l, input int unsigned e, input int first_path);
    dp_ctrl_t c;
    logic [W-1:0] a1 = rnd(), a2 = rnd(), b1 = rnd(), b2 = rnd(), exp;
    cycles = 0;
    if (l == R1) begin
      c = DP_CTRL_IDLE; c.ld[R1] = 1; c.ld[R2] = 1;
      cyc(c, a1, b1);
      cyc(c, a2, b2);
    end else begin
      // Depth-2 control path PI1-R1-ADD(mask)-R3/R4, depth-1 PI2-MUX1-R2.
      c = DP_CTRL_IDLE; c.ld[R1] = 1;
      cyc(c, a1, rnd());
      c = DP_CTRL_IDLE; c.ld[R1] = 1; c.ld[l] = 1; c.ld[R2] = 1; c.add_mask = 1;
      cyc(c, a2, b1);
      c = DP_CTRL_IDLE; c.ld[l] = 1; c.ld[R2] = 1; c.add_mask = 1;
      cyc(c, rnd(), b2);
    end
    c = DP_CTRL_IDLE; c.ld[e] = 1;
    c.mux3_sel = (l == R3); c.mux5_sel = (l == R4); c.mux1_sel = 1;
    if (e == R2) c.ld[R1] = 1;
    cyc(c, 16'd1, rnd());
    exp = W'(a2 * b2);
    if (e == R2) begin
      c = DP_CTRL_IDLE; c.ld[R5] = 1;                    // R1(=1) * R2 -> R5
      cyc(c, rnd(), rnd());
    end
    chk(first_path, "PO2", po2, exp);
    tested[first_path + (l == R1 ? 0 : l == R3 ? 1 : 2)] = 1;
    tested[first_path + 3] = 1;                          // R2 as path start
    total_cycles += cycles;
    if (verbose) $display("MULT plan R%0d,R2 -> R%0d: %0d clocks", l + 1, e + 1, cycles);
  endtask

  initial begin
    dp_ctrl_t c;
    logic [W-1:0] v1, v2;
    #12 rst_n = 1;
    for (int r = 0; r < 10; r++) begin
      // 1: PI1-R1, observed through MULT with R2 = 1.
      support_one(R2);
      v1 = rnd(); v2 = rnd(); cycles = 0;
      c = DP_CTRL_IDLE; c.ld[R1] = 1;
      cyc(c, v1, rnd()); cyc(c, v2, rnd());
      c = DP_CTRL_IDLE; c.ld[R5] = 1;
      cyc(c, rnd(), rnd());
      chk(1, "PO2", po2, v2); tested[1] = 1; total_cycles += cycles;
      // 2: PI2-MUX1-R2, observed through MULT with R1 = 1.
      support_one(R1);
      v1 = rnd(); v2 = rnd(); cycles = 0;
      c = DP_CTRL_IDLE; c.ld[R2] = 1;
      cyc(c, rnd(), v1); cyc(c, rnd(), v2);
      c = DP_CTRL_IDLE; c.ld[R5] = 1;
      cyc(c, rnd(), rnd());
      chk(2, "PO2", po2, v2); tested[2] = 1; total_cycles += cycles;
      // 7-12: ADD paths.
      add_plan(R3, R3, 7);
      add_plan(R4, R3, 7);
      add_plan(R3, R4, 10);
      add_plan(R4, R4, 10);
      // 3-6 and 13-16: MULT paths (end at R2 or R5; first + 3 is R2 as start).
      mult_plan(R1, R2, 3);  mult_plan(R3, R2, 3);  mult_plan(R4, R2, 3);
      mult_plan(R1, R5, 13); mult_plan(R3, R5, 13); mult_plan(R4, R5, 13);
      // 17: R4-PO1, pair through the test MUX, seen in consecutive clocks.
      v1 = rnd(); v2 = rnd(); cycles = 0;
      c = DP_CTRL_IDLE; c.ld[R4] = 1; c.tmux_sel = 1;
      cyc(c, rnd(), v1); chk(17, "PO1 v1", po1, v1);
      cyc(c, rnd(), v2); chk(17, "PO1 v2", po1, v2);
      tested[17] = 1; total_cycles += cycles;
      // 18: R5-PO2, pair through PI1-R1-MULT (R2 = 1) into R5.
      support_one(R2);
      v1 = rnd(); v2 = rnd(); cycles = 0;
      c = DP_CTRL_IDLE; c.ld[R1] = 1;
      cyc(c, v1, rnd());
      c = DP_CTRL_IDLE; c.ld[R1] = 1; c.ld[R5] = 1;
      cyc(c, v2, rnd());     chk(18, "PO2 v1", po2, v1);
      c = DP_CTRL_IDLE; c.ld[R5] = 1;
      cyc(c, rnd(), rnd());  chk(18, "PO2 v2", po2, v2);
      tested[18] = 1; total_cycles += cycles;
      verbose = 0;
    end
    for (int p = 1; p <= 18; p++) begin
      checks++;
      if (!tested[p]) begin failures++; $display("RTL path %0d never tested", p); end
    end
    $display("18 RTL paths, %0d plan clocks in total over 10 rounds", total_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
