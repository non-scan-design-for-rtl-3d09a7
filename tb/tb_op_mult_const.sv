// Self-checking testbench of op_mult_const at two constants: random
// operands, product compared with a reference truncated to the line width.
module tb_op_mult_const;
  localparam int W = 16;
  logic [W-1:0] a, y3, y7;
  logic [63:0] p;
  int checks = 0, failures = 0;

  op_mult_const #(.W(W))              dut3 (.a, .y(y3));
  op_mult_const #(.W(W), .K(16'h00b7)) dut7 (.a, .y(y7));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      a = (i == 0) ? '1 : W'($urandom);
      #1;
      p = 64'(a) * 64'd3;
      checks++;
      if (y3 !== p[W-1:0]) begin failures++; $display("FAIL %h*3 = %h", a, y3); end
      p = 64'(a) * 64'h00b7;
      checks++;
      if (y7 !== p[W-1:0]) begin failures++; $display("FAIL %h*b7 = %h", a, y7); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
