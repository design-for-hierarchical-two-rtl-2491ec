// tb_cpath_pair: self-checking test of the control-path pair.
//
// Drives the two structures of the method's two-pattern conditions with
// their reference schedules and checks every register content the
// schedules list, clock by clock:
//   * default parameters, condition-3 example (two hold registers on C1'):
//     MP gets v11, v21, v12, v22 in clocks 0..3; v11/v12 must reach EP1/EP2
//     together in clock 7 and v21/v22 in clock 8 (condition 3).
//   * N1=3, HOLD1=3'b010, N2=4 (condition-4 example: depths differ by one, hold on the
//     shallower path): MP gets v11, v12, v22, v21; the pair arrives in
//     clocks 5 and 6 (condition 4).
//   * N1=4, N2=2, no hold registers (condition 2, depths differ by two):
//     v11, v21 enter the deeper chain in clocks 0, 1 and v12, v22 the
//     shallower one in clocks 2, 3; the pair arrives in clocks 4 and 5.
// The vectors are random, so the test also fails if any register loses or
// mixes up a partial vector. Clock k is the content after the k-th edge.
module tb_cpath_pair;
  localparam int unsigned W = 16;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  // condition-3 example
  logic [W-1:0] mp_c = '0;
  logic [4:0] ld1_c = '1, ld2_c = '1;
  logic [4:0][W-1:0] c1_c, c2_c;
  logic [W-1:0] ep1_c, ep2_c;
  cpath_pair #(.WIDTH(W)) dut_c (
    .clk, .rst_n, .mp(mp_c), .ld1(ld1_c), .ld2(ld2_c),
    .c1_q(c1_c), .c2_q(c2_c), .ep1(ep1_c), .ep2(ep2_c));

  // condition-4 example
  logic [W-1:0] mp_d = '0;
  logic [2:0] ld1_d = '1;
  logic [3:0] ld2_d = '1;
  logic [2:0][W-1:0] c1_d;
  logic [3:0][W-1:0] c2_d;
  logic [W-1:0] ep1_d, ep2_d;
  cpath_pair #(.WIDTH(W), .N1(3), .N2(4), .HOLD1(3'b010), .HOLD2(4'b0000)) dut_d (
    .clk, .rst_n, .mp(mp_d), .ld1(ld1_d), .ld2(ld2_d),
    .c1_q(c1_d), .c2_q(c2_d), .ep1(ep1_d), .ep2(ep2_d));

  // condition-2 example: depths 4 and 2, no hold register
  logic [W-1:0] mp_b = '0;
  logic [3:0][W-1:0] c1_b;
  logic [1:0][W-1:0] c2_b;
  logic [W-1:0] ep1_b, ep2_b;
  cpath_pair #(.WIDTH(W), .N1(4), .N2(2), .HOLD1(4'b0000), .HOLD2(2'b00)) dut_b (
    .clk, .rst_n, .mp(mp_b), .ld1(4'b1111), .ld2(2'b11),
    .c1_q(c1_b), .c2_q(c2_b), .ep1(ep1_b), .ep2(ep2_b));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input int k, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("clock %0d %s = %h, expected %h", k, what, got, exp);
    end
  endtask

  logic [W-1:0] v11, v21, v12, v22;

  task automatic new_vectors();
    v11 = W'($urandom); v21 = W'($urandom); v12 = W'($urandom); v22 = W'($urandom);
  endtask

  // condition-3 schedule. ld of R21 (index 1) and R41 (index 3) per edge k.
  task automatic run_table1();
    logic [W-1:0] mp_seq [0:8];
    new_vectors();
    mp_seq = '{v11, v21, v12, v22, W'($urandom), W'($urandom), W'($urandom), W'($urandom), W'($urandom)};
    for (int k = 1; k <= 8; k++) begin
      @(negedge clk);
      mp_c = mp_seq[k-1];
      ld1_c = '1;
      if (k == 4 || k == 5)           ld1_c[1] = 1'b0;   // R21 holds v21
      if (k == 5 || k == 6)           ld1_c[3] = 1'b0;   // R41 holds v11
      @(posedge clk); #1;
      case (k)
        1: chk("R11", k, c1_c[0], v11);
        2: begin chk("R11", k, c1_c[0], v21); chk("R21", k, c1_c[1], v11); end
        3: begin chk("R21", k, c1_c[1], v21); chk("R31", k, c1_c[2], v11); chk("R12", k, c2_c[0], v12); end
        4: begin chk("R21", k, c1_c[1], v21); chk("R41", k, c1_c[3], v11);
                 chk("R12", k, c2_c[0], v22); chk("R22", k, c2_c[1], v12); end
        5: begin chk("R21", k, c1_c[1], v21); chk("R41", k, c1_c[3], v11);
                 chk("R22", k, c2_c[1], v22); chk("R32", k, c2_c[2], v12); end
        6: begin chk("R31", k, c1_c[2], v21); chk("R41", k, c1_c[3], v11);
                 chk("R32", k, c2_c[2], v22); chk("R42", k, c2_c[3], v12); end
        7: begin chk("R41", k, c1_c[3], v21); chk("EP1", k, ep1_c, v11);
                 chk("R42", k, c2_c[3], v22); chk("EP2", k, ep2_c, v12); end
        8: begin chk("EP1", k, ep1_c, v21); chk("EP2", k, ep2_c, v22); end
        default: ;
      endcase
    end
  endtask

  // condition-4 schedule. ld of R21 (index 1) per edge k.
  task automatic run_table2();
    logic [W-1:0] mp_seq [0:5];
    new_vectors();
    mp_seq = '{v11, v12, v22, v21, W'($urandom), W'($urandom)};
    for (int k = 1; k <= 6; k++) begin
      @(negedge clk);
      mp_d = mp_seq[k-1];
      ld1_d = '1;
      if (k == 3 || k == 4) ld1_d[1] = 1'b0;   // R21 holds v11
      @(posedge clk); #1;
      case (k)
        1: chk("R11", k, c1_d[0], v11);
        2: begin chk("R21", k, c1_d[1], v11); chk("R12", k, c2_d[0], v12); end
        3: begin chk("R21", k, c1_d[1], v11); chk("R12", k, c2_d[0], v22); chk("R22", k, c2_d[1], v12); end
        4: begin chk("R11", k, c1_d[0], v21); chk("R21", k, c1_d[1], v11);
                 chk("R22", k, c2_d[1], v22); chk("R32", k, c2_d[2], v12); end
        5: begin chk("R21", k, c1_d[1], v21); chk("EP1", k, ep1_d, v11);
                 chk("R32", k, c2_d[2], v22); chk("EP2", k, ep2_d, v12); end
        6: begin chk("EP1", k, ep1_d, v21); chk("EP2", k, ep2_d, v22); end
        default: ;
      endcase
    end
  endtask

  // condition 2: deeper chain first, shallower chain two clocks later.
  task automatic run_cond2();
    logic [W-1:0] mp_seq [0:4];
    new_vectors();
    mp_seq = '{v11, v21, v12, v22, W'($urandom)};
    for (int k = 1; k <= 5; k++) begin
      @(negedge clk);
      mp_b = mp_seq[k-1];
      @(posedge clk); #1;
      if (k == 4) begin chk("EP1", k, ep1_b, v11); chk("EP2", k, ep2_b, v12); end
      if (k == 5) begin chk("EP1", k, ep1_b, v21); chk("EP2", k, ep2_b, v22); end
    end
  endtask

  initial begin
    #12 rst_n = 1;
    for (int r = 0; r < 20; r++) begin
      run_table1();
      run_table2();
      run_cond2();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
