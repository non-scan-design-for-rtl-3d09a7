// Data path register, with or without the hold function.
//
// A hold function is a MUX in front of the register that feeds the register's
// own output back to its input, so the register keeps its value while its load
// enable is 0 and loads d while it is 1. A register built without the hold
// function (HOLD = 0) has no such MUX and loads on every clock edge; its load
// enable input is then ignored, which models the rule that a register without
// hold behaves as if its load enable were constantly 1.
//
// Interface: rising-edge clock, asynchronous active-low reset to 0 (the reset
// is this design's choice), d is captured one clock after it is presented.
module hold_reg #(
  parameter int unsigned W    = 16,
  parameter bit          HOLD = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] d_next;

  // Feedback MUX of the hold function; absent when HOLD = 0.
  if (HOLD) begin : g_hold
    mux2 #(.W(W)) u_hold_mux (.sel(ld), .in0(q), .in1(d), .y(d_next));
  end else begin : g_load
    always_comb d_next = d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d_next;
  end

endmodule
