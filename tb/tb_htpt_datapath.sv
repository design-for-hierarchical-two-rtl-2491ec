// tb_htpt_datapath: self-checking test of the HTPT example data path.
//
// Part 1 drives random control words and primary inputs for many clocks and
// compares PO1 and PO2 every clock with a cycle-level reference model of the
// data path written here from its connection list (registers, MUXes, ADD,
// MULT, test MUX, thru mask, constant register). Because every register
// eventually reaches a PO through the random MUX settings, a wrong
// connection anywhere shows up at the outputs.
// Part 2 applies the test plan of RTL path R1-MUX3-MUX5-MULT-R5: vector
// pair (v11, v21) through PI1-R1 and (v12, v22) through PI2-MUX1-R2, both
// arriving in consecutive clocks; R5 must capture v21*v22 one clock after
// the second vector is applied, and PO2 shows it.
module tb_htpt_datapath;
  import htpt_pkg::*;
  localparam int unsigned W = 16;
  localparam logic [W-1:0] K = 16'h0003;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] pi1 = '0, pi2 = '0, po1, po2;
  dp_ctrl_t ctrl = DP_CTRL_IDLE;
  int checks = 0, failures = 0;

  htpt_datapath #(.WIDTH(W), .CONST_VAL(K)) dut (.clk, .rst_n, .pi1, .pi2, .ctrl, .po1, .po2);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model state.
  logic [W-1:0] m [1:5];

  task automatic model_step(input dp_ctrl_t c, input logic [W-1:0] p1, input logic [W-1:0] p2);
    logic [W-1:0] mux4, addb, addy, tm, mux3, mux5, mult;
    logic [W-1:0] n [1:5];
    mux4 = c.mux4_sel ? m[4] : m[3];
    addb = c.add_mask ? '0 : mux4;
    addy = m[1] + addb;
    tm   = c.tmux_sel ? p2 : addy;
    mux3 = c.mux3_sel ? m[3] : m[1];
    mux5 = c.mux5_sel ? m[4] : mux3;
    mult = W'(mux5 * m[2]);
    n[1] = p1;
    n[2] = c.mux1_sel ? mult : p2;
    n[3] = c.mux2_sel ? K : tm;
    n[4] = c.mux6_sel ? K : tm;
    n[5] = mult;
    for (int i = 1; i <= 5; i++) if (c.ld[i-1]) m[i] = n[i];
  endtask

  task automatic cycle(input dp_ctrl_t c, input logic [W-1:0] p1, input logic [W-1:0] p2);
    @(negedge clk);
    ctrl = c; pi1 = p1; pi2 = p2;
    @(posedge clk);
    model_step(c, p1, p2);
    #1;
    checks += 2;
    if (po1 !== m[4]) begin failures++; $display("t=%0t PO1=%h expected %h", $time, po1, m[4]); end
    if (po2 !== m[5]) begin failures++; $display("t=%0t PO2=%h expected %h", $time, po2, m[5]); end
  endtask

  initial begin
    dp_ctrl_t c;
    logic [W-1:0] v11, v21, v12, v22;
    for (int i = 1; i <= 5; i++) m[i] = '0;
    #12 rst_n = 1;
    // Part 1: random operation.
    for (int i = 0; i < 3000; i++) begin
      c = dp_ctrl_t'($urandom);
      cycle(c, W'($urandom), W'($urandom));
    end
    // Part 2: two-pattern test of R1-MUX3-MUX5-MULT-R5.
    for (int r = 0; r < 10; r++) begin
      v11 = W'($urandom); v21 = W'($urandom); v12 = W'($urandom); v22 = W'($urandom);
      c = DP_CTRL_IDLE; c.ld[R1] = 1; c.ld[R2] = 1;       // load first vector
      cycle(c, v11, v12);
      cycle(c, v21, v22);                                  // second vector launches
      c = DP_CTRL_IDLE; c.ld[R5] = 1;                      // MUX3/MUX5 select R1
      cycle(c, '0, '0);                                    // R5 captures
      checks++;
      if (po2 !== W'(v21 * v22)) begin failures++; $display("test plan: PO2=%h expected %h", po2, W'(v21 * v22)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
