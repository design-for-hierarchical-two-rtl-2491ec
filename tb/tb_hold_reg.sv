// tb_hold_reg: self-checking test of the hold register: reset value, then
// random load enables and data compared each clock with a reference copy.
module tb_hold_reg;
  localparam int unsigned W = 16;
  logic clk = 0, rst_n = 0, ld = 0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0, holds = 0;

  hold_reg #(.WIDTH(W), .RESET_VAL(16'hA5A5)) dut (.clk, .rst_n, .ld, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++;
    if (q !== 16'hA5A5) begin failures++; $display("reset value %h", q); end
    model = 16'hA5A5;
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      ld = 1'($urandom);
      d  = W'($urandom);
      @(posedge clk);
      if (ld) model = d; else holds++;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("cycle %0d q=%h expected %h", i, q, model); end
    end
    checks++;
    if (holds == 0) begin failures++; $display("hold never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
