// Self-checking testbench of mux2: random data on both inputs, both select
// values, output compared with the selected input.
module tb_mux2;
  localparam int W = 16;
  logic sel;
  logic [W-1:0] in0, in1, y;
  int checks = 0, failures = 0;

  mux2 #(.W(W)) dut (.sel, .in0, .in1, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      in0 = W'($urandom);
      in1 = W'($urandom);
      sel = i[0];
      #1;
      checks++;
      if (y !== (i[0] ? in1 : in0)) begin
        failures++;
        $display("FAIL sel=%0d in0=%h in1=%h y=%h", sel, in0, in1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
