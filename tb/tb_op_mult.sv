// tb_op_mult: self-checking test of the multiplier module: random operands,
// low WIDTH bits of the product compared with a 64-bit reference; also
// checks that a 1 on one input makes it a thru function from the other.
module tb_op_mult;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  op_mult #(.WIDTH(W)) dut (.a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned exp;
    for (int i = 0; i < 1000; i++) begin
      a = W'($urandom);
      b = (i % 5 == 0) ? 16'd1 : W'($urandom);
      #1;
      exp = (longint'(a) * longint'(b)) % 65536;
      checks++;
      if (y !== W'(exp)) begin failures++; $display("mult mismatch %h*%h=%h", a, b, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
