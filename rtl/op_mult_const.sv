// Multiplier by a constant (Mult1 of the LWF data path).
//
// The module has one data input; its other operand is the constant K. The
// product is truncated to the W-bit line width shared by all data lines. The
// value of K is this design's choice (the filter coefficient is not given).
// Because the second operand is fixed, a constant on an input cannot give this
// module a thru function; the data path gives it one with a bypass MUX.
// Purely combinational.
module op_mult_const #(
  parameter int unsigned W = 16,
  parameter logic [W-1:0] K = W'(3)
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);

  logic [2*W-1:0] prod;

  always_comb begin
    prod = a * K;
    y    = prod[W-1:0];
  end

endmodule
