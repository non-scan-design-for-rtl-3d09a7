// Shared types and constants for the SPC two-pattern testable LWF data path.
//
// The data path is controlled entirely from outside: every MUX select and
// every register load enable is a directly controllable input, as the DFT
// method assumes for a data path that has been separated from its controller.
// This package bundles those control lines into one packed struct so that the
// top level and its testbench agree on their names and order.
//
// Select convention (the usual 0/1 numbering of MUX inputs, left to right):
// select 0 passes the first input listed for each MUX below, select 1 the second.
package spc_dft_pkg;

  // Default bit width of every data line (the LWF benchmark is 16 bits wide).
  localparam int unsigned LWF_BW = 16;

  // Control word of the LWF data path.
  typedef struct packed {
    logic m1_sel;       // 0: PI1,        1: R1
    logic m2_sel;       // 0: m1,         1: R1
    logic m3_sel;       // 0: PI2,        1: R2
    logic m4_sel;       // 0: m3,         1: R3
    logic m5_sel;       // 0: Add1,       1: Mult1
    logic tmux_sel;     // DFT MUX in front of R1. 0: m5 (normal), 1: PI2 (test path)
    logic r1_ld;        // load enable of R1 (hold function added by the DFT)
    logic r2_ld;        // load enable of hold register R2
    logic r3_ld;        // load enable of hold register R3
    logic r4_ld;        // load enable of hold register R4
    logic mask_add1_a;  // force Add1 left operand to 0 (thru of the right operand)
    logic mask_add1_b;  // force Add1 right operand to 0 (thru of the left operand)
    logic mask_add2_a;  // force Add2 left operand to 0
    logic mask_add2_b;  // force Add2 right operand to 0
    logic mult_thru;    // bypass Mult1: pass R1 unchanged
  } lwf_ctrl_t;

  // Control word for normal operation with every DFT element inactive and
  // all hold registers loading.
  localparam lwf_ctrl_t LWF_CTRL_IDLE = '{
    m1_sel: 1'b0, m2_sel: 1'b0, m3_sel: 1'b0, m4_sel: 1'b0, m5_sel: 1'b0,
    tmux_sel: 1'b0, r1_ld: 1'b1, r2_ld: 1'b1, r3_ld: 1'b1, r4_ld: 1'b1,
    mask_add1_a: 1'b0, mask_add1_b: 1'b0, mask_add2_a: 1'b0, mask_add2_b: 1'b0,
    mult_thru: 1'b0
  };

endpackage
