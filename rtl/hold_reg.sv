// hold_reg: data path register with a hold (load-enable) control.
//
// With `ld` high the register captures `d` at the rising clock edge; with
// `ld` low it keeps its value. A register with hold lets a control path delay
// one partial test vector while another one catches up, which is what makes
// two control paths sharing a merging point able to deliver a vector pair
// (v1 in one clock, v2 in the next) to their end points. A plain register is
// this module with `ld` tied high. Asynchronous active-low reset to
// RESET_VAL is this design's choice. Timing: one clock from `d` to `q`.
module hold_reg #(
  parameter int unsigned     WIDTH     = htpt_pkg::DP_WIDTH,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ld,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= RESET_VAL;
    else if (ld) q <= d;
  end

  // A register that is not loaded keeps its value.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    !ld |=> q == $past(q));
endmodule
