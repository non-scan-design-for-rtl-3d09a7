// Two-input adder operational module (Add1, Add2 of the LWF data path).
//
// All lines of the data path have the same bit width, so the sum is kept to
// W bits and the carry out is dropped. The adder has a natural thru function:
// with 0 on one operand, the other operand reaches the output unchanged.
// Purely combinational.
module op_add #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  always_comb begin
    y = a + b;
  end

endmodule
