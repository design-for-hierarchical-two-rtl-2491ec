// tb_reff_reg: self-checking test of the REFF register. Loads two words in
// normal mode, then checks that in test mode the output alternates between
// them every clock (first the older, then the newer, ...) and that both stay
// stored; random mode and data sequences are compared with a reference
// two-flip-flop model. Runs a single REFF (WIDTH = 1) and a 16-bit register.
module tb_reff_reg;
  localparam int unsigned W = 16;
  logic clk = 0, rst_n = 0, tm = 0;
  logic [W-1:0] d = '0, q, qb;
  logic d1 = 0, q1, qb1;
  logic [W-1:0] ma, mb;
  logic m1a, m1b;
  int checks = 0, failures = 0;

  reff_reg #(.WIDTH(W)) dut   (.clk, .rst_n, .test_mode(tm), .d(d),  .q(q),  .q_b(qb));
  reff_reg               dut1 (.clk, .rst_n, .test_mode(tm), .d(d1), .q(q1), .q_b(qb1));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic mode, input logic [W-1:0] val, input logic v1);
    @(negedge clk);
    tm = mode; d = val; d1 = v1;
    @(posedge clk);
    if (mode) begin ma <= mb; m1a <= m1b; end else begin ma <= d; m1a <= d1; end
    mb <= ma; m1b <= m1a;
    #1;
    checks += 2;
    if (q !== ma || qb !== mb) begin failures++; $display("W=16 q=%h qb=%h exp %h %h", q, qb, ma, mb); end
    if (q1 !== m1a || qb1 !== m1b) begin failures++; $display("W=1 q=%b qb=%b exp %b %b", q1, qb1, m1a, m1b); end
  endtask

  initial begin
    logic [W-1:0] v1, v2;
    ma = '0; mb = '0; m1a = 0; m1b = 0;
    #12 rst_n = 1;
    // Directed: load v1 then v2, then rotate.
    v1 = 16'h1234; v2 = 16'hBEEF;
    step(0, v1, 1'b0);
    step(0, v2, 1'b1);
    for (int i = 0; i < 8; i++) begin
      step(1, W'($urandom), 1'($urandom));
      checks += 2;
      if (q !== ((i % 2 == 0) ? v1 : v2)) begin failures++; $display("rotate %0d q=%h", i, q); end
      if (q1 !== ((i % 2 == 0) ? 1'b0 : 1'b1)) begin failures++; $display("rotate1 %0d q=%b", i, q1); end
    end
    // Random.
    for (int i = 0; i < 400; i++) step(1'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
