// reff_reg: register of rotating enhanced flip-flops (REFFs).
//
// Each bit is an REFF: two flip-flops, A and B, and a MUX in front of A whose
// select is the mode input. B always takes A's value. In normal mode
// (`test_mode` = 0) A takes `d`, so the output `q` (= A) behaves like an
// ordinary flip-flop, and two consecutive loads leave the older bit in B and
// the newer one in A. In test mode A takes B instead, so the two stored bits
// swap places every clock and stay stored: `q` alternates between them for
// as long as test mode lasts. The register therefore acts as a 2-word hold
// register that can replay a vector pair (v1, v2) at will. With WIDTH = 1 it
// is a single REFF; with the data path width it is the global REFF register
// that serves as an extra two-pattern source in a single-input data path.
//
// The two flip-flops and the mode MUX follow the method; which flip-flop
// drives the output and the asynchronous active-low reset to 0 are this
// design's choices. Timing: `d` reaches `q` one clock after it is applied.
module reff_reg #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             test_mode,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic [WIDTH-1:0] q_b        // second (rotating) flip-flop, for observation
);
  logic [WIDTH-1:0] ff_a, ff_b, a_next;

  // Mode MUX in front of flip-flop A.
  always_comb a_next = test_mode ? ff_b : d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ff_a <= '0;
      ff_b <= '0;
    end else begin
      ff_a <= a_next;
      ff_b <= ff_a;
    end
  end

  assign q   = ff_a;
  assign q_b = ff_b;

  // In test mode the two stored bits swap places and none is lost.
  a_rotate: assert property (@(posedge clk) disable iff (!rst_n)
    test_mode |=> (ff_a == $past(ff_b)) && (ff_b == $past(ff_a)));
endmodule
