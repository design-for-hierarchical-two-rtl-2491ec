// tb_thru_mask: self-checking test of the thru mask. Checks both the
// pass-through and the forced-constant behaviour, for a mask value of 0
// (adder identity) and of 1 (multiplier identity).
module tb_thru_mask;
  localparam int unsigned W = 16;
  logic mask_en;
  logic [W-1:0] d, y0, y1;
  int checks = 0, failures = 0;

  thru_mask #(.WIDTH(W), .MASK_VALUE(16'd0)) dut0 (.mask_en, .d, .y(y0));
  thru_mask #(.WIDTH(W), .MASK_VALUE(16'd1)) dut1 (.mask_en, .d, .y(y1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      mask_en = 1'($urandom);
      d = W'($urandom) | 16'h0100;
      #1;
      checks += 2;
      if (y0 !== (mask_en ? 16'd0 : d)) begin failures++; $display("mask0 mismatch en=%0d d=%h y=%h", mask_en, d, y0); end
      if (y1 !== (mask_en ? 16'd1 : d)) begin failures++; $display("mask1 mismatch en=%0d d=%h y=%h", mask_en, d, y1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
