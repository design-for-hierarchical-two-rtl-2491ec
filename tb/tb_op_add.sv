// tb_op_add: self-checking test of the adder module: random operands plus
// the carry-out corner, result compared modulo 2^WIDTH; also checks that a
// 0 on one input makes it a thru function from the other.
module tb_op_add;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  op_add #(.WIDTH(W)) dut (.a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned exp;
    for (int i = 0; i < 1002; i++) begin
      a = W'($urandom);
      b = (i % 5 == 0) ? '0 : W'($urandom);
      if (i == 1000) begin a = '1; b = 16'd1; end
      if (i == 1001) begin a = 16'h8000; b = 16'h8000; end
      #1;
      exp = (int'(a) + int'(b)) % 65536;
      checks++;
      if (y !== W'(exp)) begin failures++; $display("add mismatch %h+%h=%h", a, b, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
