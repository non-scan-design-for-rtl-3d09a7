// Self-checking testbench of op_add: random operands, the thru cases with a
// zero operand, and wrap-around at the line width.
module tb_op_add;
  localparam int W = 16;
  logic [W-1:0] a, b, y;
  logic [31:0] ref_sum;
  int checks = 0, failures = 0;

  op_add #(.W(W)) dut (.a, .b, .y);

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb);
    a = ta; b = tb; #1;
    ref_sum = 32'(ta) + 32'(tb);
    checks++;
    if (y !== ref_sum[W-1:0]) begin
      failures++;
      $display("FAIL %h + %h = %h", ta, tb, y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('1, 16'd1);
    check(16'h8000, 16'h8000);
    for (int i = 0; i < 300; i++) check(W'($urandom), W'($urandom));
    for (int i = 0; i < 50; i++) check(W'($urandom), '0);
    for (int i = 0; i < 50; i++) check('0, W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
