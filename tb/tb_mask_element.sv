// Self-checking testbench of mask_element with an adder-style (0) and a
// multiplier-style (1) constant: pass-through while unmasked, constant while
// masked.
module tb_mask_element;
  localparam int W = 16;
  logic mask;
  logic [W-1:0] d, y0, y1;
  int checks = 0, failures = 0;

  mask_element #(.W(W))            dut0 (.mask, .d, .y(y0));
  mask_element #(.W(W), .C(16'd1)) dut1 (.mask, .d, .y(y1));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      d = W'($urandom) | W'(2);
      mask = i[0];
      #1;
      checks += 2;
      if (y0 !== (mask ? W'(0) : d)) begin failures++; $display("FAIL C=0 mask=%0d d=%h y=%h", mask, d, y0); end
      if (y1 !== (mask ? W'(1) : d)) begin failures++; $display("FAIL C=1 mask=%0d d=%h y=%h", mask, d, y1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
