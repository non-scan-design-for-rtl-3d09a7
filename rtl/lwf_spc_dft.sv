// LWF benchmark data path made SPC two-pattern testable without scan.
//
// The data path has two primary inputs (PI1, PI2), two primary outputs
// (PO1 = R5, PO2 = R4), five registers, five MUXes, two adders and a
// multiplier by a constant:
//
//   m1 = m1_sel ? R1   : PI1        m2 = m2_sel ? R1 : m1
//   m3 = m3_sel ? R2   : PI2        m4 = m4_sel ? R3 : m3
//   Add1 = m2 + m4                  Add2 = R1 + R2        Mult1 = R1 * K
//   m5 = m5_sel ? Mult1 : Add1
//   R1 <= tmux_sel ? PI2 : m5       R2 <= PI1   R3 <= PI2
//   R4 <= Add2                      R5 <= Add1
//
// R2, R3 and R4 are hold registers in the original circuit; R1 and R5 are not.
// The DFT method adds two elements to this circuit:
//   * a MUX between m5 and R1 that creates the control path PI2-MUX-R1. The
//     self-loop R1-m1-m2-Add1-m5-R1 otherwise leaves no way to place an
//     arbitrary pair of vectors into R1.
//   * a hold function on R1, so that R1 can keep the stable off-path value
//     while R2 receives the two launch vectors of the on-path R2-Add2-R4.
// With these, each RTL path can receive a single-port-change two-pattern test:
// the port at the start of the on-path changes between the two vectors, and
// every other port of the combinational block, above all the off-path, stays
// the same.
//
// The remaining DFT elements of the method are thru functions. In this data
// path a primary input can justify 0 on the other operand of each adder, so
// the adders need no extra hardware and ADD_THRU_MASKS defaults to 0; setting
// it to 1 puts mask elements on the four adder operands. MULT_THRU_BYPASS = 1
// adds a bypass MUX that gives Mult1 a thru function. Both are off by
// default; they are this design's options, not elements the method places in
// this circuit.
//
// Interface: all MUX selects, load enables and mask controls come in through
// the packed control word ctrl (see spc_dft_pkg). Everything is registered
// on the rising edge of clk with an asynchronous active-low reset to 0. A
// value on a PI reaches R1, R2, R3 or R5 at the next clock edge; R4 is fed
// only from R1 and R2, so a PI value needs two edges to reach PO2. The bit
// width of 16, the wiring and the register kinds follow the LWF benchmark
// circuit; the constant K, the reset and the select polarity are this
// design's choices.
module lwf_spc_dft
  import spc_dft_pkg::*;
#(
  parameter int unsigned  BW               = LWF_BW,
  parameter logic [BW-1:0] MULT_K          = BW'(3),
  parameter bit           ADD_THRU_MASKS   = 1'b0,
  parameter bit           MULT_THRU_BYPASS = 1'b0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [BW-1:0] pi1,
  input  logic [BW-1:0] pi2,
  input  lwf_ctrl_t     ctrl,
  output logic [BW-1:0] po1,
  output logic [BW-1:0] po2
);

  logic [BW-1:0] r1, r2, r3, r4, r5;
  logic [BW-1:0] m1, m2, m3, m4, m5, r1_d;
  logic [BW-1:0] add1_a, add1_b, add2_a, add2_b;
  logic [BW-1:0] add1, add2, mult1, mult1_out;

  // ---------------------------------------------------------------- MUXes
  mux2 #(.W(BW)) u_m1 (.sel(ctrl.m1_sel), .in0(pi1), .in1(r1), .y(m1));
  mux2 #(.W(BW)) u_m2 (.sel(ctrl.m2_sel), .in0(m1),  .in1(r1), .y(m2));
  mux2 #(.W(BW)) u_m3 (.sel(ctrl.m3_sel), .in0(pi2), .in1(r2), .y(m3));
  mux2 #(.W(BW)) u_m4 (.sel(ctrl.m4_sel), .in0(m3),  .in1(r3), .y(m4));
  mux2 #(.W(BW)) u_m5 (.sel(ctrl.m5_sel), .in0(add1), .in1(mult1_out), .y(m5));

  // DFT MUX: new control path PI2-MUX-R1.
  mux2 #(.W(BW)) u_tmux (.sel(ctrl.tmux_sel), .in0(m5), .in1(pi2), .y(r1_d));

  // ------------------------------------------------- operand thru functions
  if (ADD_THRU_MASKS) begin : g_masks
    mask_element #(.W(BW), .C('0)) u_mk_add1_a (.mask(ctrl.mask_add1_a), .d(m2), .y(add1_a));
    mask_element #(.W(BW), .C('0)) u_mk_add1_b (.mask(ctrl.mask_add1_b), .d(m4), .y(add1_b));
    mask_element #(.W(BW), .C('0)) u_mk_add2_a (.mask(ctrl.mask_add2_a), .d(r1), .y(add2_a));
    mask_element #(.W(BW), .C('0)) u_mk_add2_b (.mask(ctrl.mask_add2_b), .d(r2), .y(add2_b));
  end else begin : g_no_masks
    always_comb begin
      add1_a = m2;
      add1_b = m4;
      add2_a = r1;
      add2_b = r2;
    end
  end

  // ------------------------------------------------------ operational modules
  op_add #(.W(BW)) u_add1 (.a(add1_a), .b(add1_b), .y(add1));
  op_add #(.W(BW)) u_add2 (.a(add2_a), .b(add2_b), .y(add2));
  op_mult_const #(.W(BW), .K(MULT_K)) u_mult1 (.a(r1), .y(mult1));

  if (MULT_THRU_BYPASS) begin : g_mult_bypass
    mux2 #(.W(BW)) u_mult_thru (.sel(ctrl.mult_thru), .in0(mult1), .in1(r1), .y(mult1_out));
  end else begin : g_no_mult_bypass
    always_comb mult1_out = mult1;
  end

  // ---------------------------------------------------------------- registers
  hold_reg #(.W(BW), .HOLD(1'b1)) u_r1 (.clk, .rst_n, .ld(ctrl.r1_ld), .d(r1_d), .q(r1));
  hold_reg #(.W(BW), .HOLD(1'b1)) u_r2 (.clk, .rst_n, .ld(ctrl.r2_ld), .d(pi1),  .q(r2));
  hold_reg #(.W(BW), .HOLD(1'b1)) u_r3 (.clk, .rst_n, .ld(ctrl.r3_ld), .d(pi2),  .q(r3));
  hold_reg #(.W(BW), .HOLD(1'b1)) u_r4 (.clk, .rst_n, .ld(ctrl.r4_ld), .d(add2), .q(r4));
  hold_reg #(.W(BW), .HOLD(1'b0)) u_r5 (.clk, .rst_n, .ld(1'b1),       .d(add1), .q(r5));

  always_comb begin
    po1 = r5;
    po2 = r4;
  end

endmodule
