// tb_mux2: self-checking test of the n-bit 2-to-1 MUX. Random selects and
// operands; the expected output is the selected operand.
module tb_mux2;
  localparam int unsigned W = 16;
  logic sel;
  logic [W-1:0] in0, in1, y;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(W)) dut (.sel, .in0, .in1, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      sel = 1'($urandom);
      in0 = W'($urandom);
      in1 = W'($urandom);
      #1;
      checks++;
      if (y !== (sel ? in1 : in0)) begin
        failures++;
        $display("mismatch sel=%0d in0=%h in1=%h y=%h", sel, in0, in1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
