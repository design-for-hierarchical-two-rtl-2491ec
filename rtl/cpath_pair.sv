// cpath_pair: two control paths fanning out of one merging point.
//
// The merging point MP is the last point two control paths C1 and C2 share
// on their way from a primary input to their end points EP1 and EP2. From MP
// the disjoint part C1' is a chain of N1 registers ending at EP1 and C2' a
// chain of N2 registers ending at EP2. Bit i of HOLD1 (HOLD2) makes register
// i+1 of C1' (C2') a hold register, loaded only when its bit of `ld1` (`ld2`)
// is high; every other register loads every clock and its `ld` bit is
// ignored. Partial vectors are fed into MP one per clock; by holding them in
// the hold registers, the two chains can present v11 and v12 at EP1 and EP2
// in the same clock and v21 and v22 in the next, which is the two-pattern
// condition. The defaults are the condition-3 example of the method
// (C1' = R11, R21(H), R31, R41(H), R51 and C2' = five plain registers);
// N1 = 3, HOLD1 = 3'b010, N2 = 4, HOLD2 = 0 gives the condition-4 example.
// The contents of every register are brought out (`c1_q`, `c2_q`, index 0 is
// the register next to MP) so a test can follow a schedule. Reset to 0 is
// this design's choice. Timing: one clock per register.
module cpath_pair #(
  parameter int unsigned   WIDTH = htpt_pkg::DP_WIDTH,
  parameter int unsigned   N1    = 5,
  parameter int unsigned   N2    = 5,
  parameter logic [N1-1:0] HOLD1 = 5'b01010,
  parameter logic [N2-1:0] HOLD2 = '0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [WIDTH-1:0]          mp,
  input  logic [N1-1:0]             ld1,
  input  logic [N2-1:0]             ld2,
  output logic [N1-1:0][WIDTH-1:0]  c1_q,
  output logic [N2-1:0][WIDTH-1:0]  c2_q,
  output logic [WIDTH-1:0]          ep1,
  output logic [WIDTH-1:0]          ep2
);
  for (genvar i = 0; i < N1; i++) begin : g_c1
    logic [WIDTH-1:0] d;
    logic             ld;
    if (i == 0) begin : g_first
      assign d = mp;
    end else begin : g_next
      assign d = c1_q[i-1];
    end
    assign ld = HOLD1[i] ? ld1[i] : 1'b1;
    hold_reg #(.WIDTH(WIDTH)) u_reg (
      .clk(clk), .rst_n(rst_n), .ld(ld), .d(d), .q(c1_q[i])
    );
  end

  for (genvar i = 0; i < N2; i++) begin : g_c2
    logic [WIDTH-1:0] d;
    logic             ld;
    if (i == 0) begin : g_first
      assign d = mp;
    end else begin : g_next
      assign d = c2_q[i-1];
    end
    assign ld = HOLD2[i] ? ld2[i] : 1'b1;
    hold_reg #(.WIDTH(WIDTH)) u_reg (
      .clk(clk), .rst_n(rst_n), .ld(ld), .d(d), .q(c2_q[i])
    );
  end

  assign ep1 = c1_q[N1-1];
  assign ep2 = c2_q[N2-1];
endmodule
