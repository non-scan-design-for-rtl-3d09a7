// Mask element: a DFT element that realises a thru function.
//
// It sits on one operand line of an operational module. While mask is 0 the
// operand passes unchanged; while mask is 1 the line is forced to the constant
// C, the identity element of the module behind it (0 for an adder, 1 for a
// multiplier), so that the module passes its other operand to its output
// unchanged. It is only needed where no primary input can justify that
// constant on the line through an existing path.
//
// Interface: mask is a directly controllable control input. Combinational.
module mask_element #(
  parameter int unsigned  W = 16,
  parameter logic [W-1:0] C = '0
) (
  input  logic         mask,
  input  logic [W-1:0] d,
  output logic [W-1:0] y
);

  always_comb begin
    y = mask ? C : d;
  end

endmodule
