// Two-input data multiplexer.
//
// Used for the data path MUXes m1..m5, for the DFT MUX that opens a new
// control path from a primary input to a register, and for the MUX that
// bypasses a module to give it a thru function. The select is a control
// input driven directly from outside the data path. While the select is held,
// the output depends only on the selected input, which is what lets an
// SPC two-pattern test treat the unselected input as don't-care.
//
// Interface: sel = 0 passes in0, sel = 1 passes in1. Purely combinational.
module mux2 #(
  parameter int unsigned W = 16
) (
  input  logic         sel,
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  output logic [W-1:0] y
);

  always_comb begin
    y = sel ? in1 : in0;
  end

endmodule
