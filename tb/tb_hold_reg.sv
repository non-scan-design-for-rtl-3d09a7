// Self-checking testbench of hold_reg: one register with the hold function
// and one without, driven with random data and random load enables. The
// hold register must keep its value while ld = 0; the plain register must
// load on every edge whatever ld is. Both must read 0 after reset.
module tb_hold_reg;
  localparam int W = 16;
  logic clk = 1'b0, rst_n = 1'b0, ld;
  logic [W-1:0] d, qh, qp, exp_h, exp_p;
  int checks = 0, failures = 0, holds = 0;

  hold_reg #(.W(W), .HOLD(1'b1)) dut_h (.clk, .rst_n, .ld, .d, .q(qh));
  hold_reg #(.W(W), .HOLD(1'b0)) dut_p (.clk, .rst_n, .ld, .d, .q(qp));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld = 1'b0; d = '1;
    #12;
    checks += 2;
    if (qh !== '0 || qp !== '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    exp_h = '0; exp_p = '0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      d  = W'($urandom);
      ld = ($urandom % 3) == 0;
      @(posedge clk);
      if (ld) exp_h = d; else if (exp_h != d) holds++;
      exp_p = d;
      #1;
      checks += 2;
      if (qh !== exp_h) begin failures++; $display("FAIL hold reg q=%h exp=%h", qh, exp_h); end
      if (qp !== exp_p) begin failures++; $display("FAIL plain reg q=%h exp=%h", qp, exp_p); end
    end
    checks++;
    if (holds == 0) begin failures++; $display("FAIL hold never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
