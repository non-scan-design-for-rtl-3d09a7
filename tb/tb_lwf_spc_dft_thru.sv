// Testbench of lwf_spc_dft with its optional thru elements built in: mask
// elements on the four adder operands and the bypass MUX around Mult1, at the
// 8-bit width of the smaller LWF configuration.
//
// Directed part: each mask element is used to pass one adder operand
// unchanged while a non-zero value sits on the other operand, and the Mult1
// bypass is used to route R1 back into R1 unchanged; the value reaching the
// ending register and the primary output is worked out here. Random part:
// random control words, with the mask and bypass controls included, checked
// every cycle against the cycle-level reference model. Each mask element and
// the bypass must have been used.
module tb_lwf_spc_dft_thru;
  import spc_dft_pkg::*;
  import lwf_model_pkg::*;

  localparam int BW = 8;
  localparam logic [15:0] K = 16'd5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [BW-1:0] pi1, pi2, po1, po2;
  lwf_ctrl_t ctrl;

  lwf_spc_dft #(.BW(BW), .MULT_K(8'd5), .ADD_THRU_MASKS(1'b1), .MULT_THRU_BYPASS(1'b1))
    dut (.clk, .rst_n, .pi1, .pi2, .ctrl, .po1, .po2);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_mask[4];
  int n_bypass = 0;
  lwf_regs_t mdl;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic lwf_ctrl_t hold_all();
    lwf_ctrl_t c = LWF_CTRL_IDLE;
    c.r1_ld = 1'b0; c.r2_ld = 1'b0; c.r3_ld = 1'b0; c.r4_ld = 1'b0;
    return c;
  endfunction

  task automatic chk(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic cyc(input logic [7:0] p1, input logic [7:0] p2, input lwf_ctrl_t c);
    lwf_regs_t nx;
    pi1 = p1; pi2 = p2; ctrl = c;
    if (c.mask_add1_a) n_mask[0]++;
    if (c.mask_add1_b) n_mask[1]++;
    if (c.mask_add2_a) n_mask[2]++;
    if (c.mask_add2_b) n_mask[3]++;
    if (c.mult_thru && c.m5_sel && c.r1_ld && !c.tmux_sel) n_bypass++;
    nx = lwf_step(mdl, 16'(p1), 16'(p2), c, 1'b1, 1'b1, BW, K);
    @(posedge clk);
    #1;
    mdl = nx;
    chk("model R1", 16'(dut.r1), mdl.r1);
    chk("model R2", 16'(dut.r2), mdl.r2);
    chk("model R3", 16'(dut.r3), mdl.r3);
    chk("model R4", 16'(dut.r4), mdl.r4);
    chk("model R5", 16'(dut.r5), mdl.r5);
  endtask

  initial begin
    lwf_ctrl_t t;
    logic [7:0] a, b;
    for (int i = 0; i < 4; i++) n_mask[i] = 0;
    pi1 = '0; pi2 = '0; ctrl = hold_all(); mdl = '0;
    #12;
    rst_n = 1'b1;
    @(negedge clk);

    for (int r = 0; r < 50; r++) begin
      a = 8'($urandom) | 8'd1;
      b = 8'($urandom) | 8'd1;

      // Load R1 = a (test path), R2 = b, R3 = b.
      t = hold_all(); t.tmux_sel = 1'b1; t.r1_ld = 1'b1; t.r2_ld = 1'b1;
      cyc(b, a, t);
      t = hold_all(); t.r3_ld = 1'b1;
      cyc('0, b, t);
      chk("setup R1", 16'(dut.r1), 16'(a));

      // Add1 thru of the right operand: R3 reaches R5 with m2 = R1 masked.
      t = hold_all(); t.m2_sel = 1'b1; t.m4_sel = 1'b1; t.mask_add1_a = 1'b1;
      cyc('0, '0, t);
      chk("mask add1_a", 16'(po1), 16'(b));
      // Add1 thru of the left operand: R1 reaches R5 with m4 = R3 masked.
      t = hold_all(); t.m2_sel = 1'b1; t.m4_sel = 1'b1; t.mask_add1_b = 1'b1;
      cyc('0, '0, t);
      chk("mask add1_b", 16'(po1), 16'(a));
      // Add2 thru of each operand into R4.
      t = hold_all(); t.r4_ld = 1'b1; t.mask_add2_a = 1'b1;
      cyc('0, '0, t);
      chk("mask add2_a", 16'(po2), 16'(b));
      t = hold_all(); t.r4_ld = 1'b1; t.mask_add2_b = 1'b1;
      cyc('0, '0, t);
      chk("mask add2_b", 16'(po2), 16'(a));
      // Unmasked, the same routes add.
      t = hold_all(); t.r4_ld = 1'b1;
      cyc('0, '0, t);
      chk("add2 unmasked", 16'(po2), 16'(8'(a + b)));
      // Mult1 bypass: R1 back into R1 unchanged; then without bypass R1*K.
      t = hold_all(); t.m5_sel = 1'b1; t.r1_ld = 1'b1; t.mult_thru = 1'b1;
      cyc('0, '0, t);
      chk("mult bypass", 16'(dut.r1), 16'(a));
      t.mult_thru = 1'b0;
      cyc('0, '0, t);
      chk("mult", 16'(dut.r1), 16'(8'(a * 8'd5)));
    end

    for (int i = 0; i < 3000; i++) cyc(8'($urandom), 8'($urandom), lwf_ctrl_t'($urandom));

    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_mask[i] == 0) begin failures++; $display("FAIL mask %0d never used", i); end
    end
    checks++;
    if (n_bypass == 0) begin failures++; $display("FAIL bypass never used"); end
    $display("mask uses %0d %0d %0d %0d, bypass uses %0d", n_mask[0], n_mask[1], n_mask[2], n_mask[3], n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
