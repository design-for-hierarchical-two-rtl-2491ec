// htpt_pkg: types and constants shared by the hierarchically two-pattern
// testable (HTPT) example data path and its testbenches.
//
// The data path's controller is not part of this design: every control input
// (register load enables, MUX selects, the test MUX select and the thru mask
// enable) is a primary control input, gathered here in one packed struct.
// The bus width default of 16 bits is this design's choice (the benchmark
// data paths it is modelled on are 16 bits wide).
package htpt_pkg;

  parameter int unsigned DP_WIDTH = 16;

  // Indices into dp_ctrl_t.ld, one load enable per data path register.
  localparam int unsigned R1 = 0;
  localparam int unsigned R2 = 1;
  localparam int unsigned R3 = 2;
  localparam int unsigned R4 = 3;
  localparam int unsigned R5 = 4;

  // Control inputs of the HTPT example data path.
  typedef struct packed {
    logic [4:0] ld;        // load enables of R5..R1 (bit R1 = R1); 0 holds
    logic       mux1_sel;  // R2 input:        0 = PI2,           1 = MULT
    logic       mux2_sel;  // R3 input:        0 = ADD side,      1 = constant register
    logic       mux3_sel;  // MUX5 in0:        0 = R1,            1 = R3
    logic       mux4_sel;  // ADD right input: 0 = R3,            1 = R4
    logic       mux5_sel;  // MULT left input: 0 = MUX3,          1 = R4
    logic       mux6_sel;  // R4 input:        0 = ADD side,      1 = constant register
    logic       tmux_sel;  // test MUX:        0 = ADD (normal),  1 = PI2 (test)
    logic       add_mask;  // thru mask on ADD right input: 1 forces it to 0
  } dp_ctrl_t;

  localparam dp_ctrl_t DP_CTRL_IDLE = '0;

endpackage
