// End-to-end testbench of lwf_spc_dft at its default parameters (16 bits).
//
// Part 1 applies a single-port-change two-pattern test to every one of the
// 19 RTL paths of the data path, in ROUNDS rounds with fresh random vectors.
// For each path it justifies the first and second launch vector (V1, V2) to
// the starting port of the path, keeps the off-path port stable, lets the
// ending register capture, and propagates the captured value to a primary
// output. It checks that
//   * the on-path operand changed between the two test cycles and the
//     off-path operand did not (the SPC property),
//   * the ending register captured the value expected from V2 and the stable
//     off-path value, worked out here from the arithmetic, and
//   * the primary output shows that value after the observation path.
// Part 2 runs the data path in normal operation with random control words
// and compares every register with a cycle-level reference model.
//
// Mechanisms counted (each must occur): hold of R1 while an off-path value is
// kept (the DFT hold function), loads of R1 over the DFT test path from PI2,
// the Mult1 route into R1, adder thru functions justified from a primary
// input, justification of tests by disjoint control paths (Theorem 1,
// condition 1) and by a hold register on the off-path (condition 4).
module tb_lwf_spc_dft;
  import spc_dft_pkg::*;
  import lwf_model_pkg::*;

  localparam int BW     = 16;
  localparam int ROUNDS = 40;
  localparam logic [15:0] K = 16'd3;  // default Mult1 constant

  logic clk = 1'b0, rst_n = 1'b0;
  logic [BW-1:0] pi1, pi2, po1, po2;
  lwf_ctrl_t ctrl;

  lwf_spc_dft dut (.clk, .rst_n, .pi1, .pi2, .ctrl, .po1, .po2);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_tests[1:19];
  int n_r1_hold = 0, n_tmux = 0, n_mult_route = 0, n_thru_pi = 0;
  int n_cond1 = 0, n_cond4 = 0, n_model_cycles = 0;

  // Operand values seen just before the last two clock edges.
  typedef struct packed {
    logic [15:0] pi1, pi2, a1a, a1b, a2a, a2b, mul_in;
  } snap_t;
  snap_t s_prev, s_cur;

  lwf_regs_t mdl;
  bit model_on = 1'b0;

  initial begin
    repeat (400000) @(posedge clk);
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

  // One clock cycle with the given primary inputs and control word.
  task automatic cyc(input logic [15:0] p1, input logic [15:0] p2, input lwf_ctrl_t c);
    lwf_regs_t nx;
    pi1 = p1; pi2 = p2; ctrl = c;
    #1;
    s_prev = s_cur;
    s_cur  = '{pi1: pi1, pi2: pi2, a1a: dut.add1_a, a1b: dut.add1_b,
               a2a: dut.add2_a, a2b: dut.add2_b, mul_in: dut.r1};
    if (c.r1_ld && !c.tmux_sel && c.m5_sel) n_mult_route++;
    if (c.r1_ld && c.tmux_sel) n_tmux++;
    nx = lwf_step(mdl, p1, p2, c, 1'b0, 1'b0, BW, K);
    @(posedge clk);
    #1;
    mdl = nx;
    if (model_on) begin
      n_model_cycles++;
      chk("model R1", dut.r1, mdl.r1);
      chk("model R2", dut.r2, mdl.r2);
      chk("model R3", dut.r3, mdl.r3);
      chk("model R4", dut.r4, mdl.r4);
      chk("model R5", dut.r5, mdl.r5);
    end
  endtask

  // SPC property over the last two cycles.
  task automatic spc(input string path, input logic [15:0] on0, input logic [15:0] on1,
                     input bit has_off, input logic [15:0] off0, input logic [15:0] off1);
    checks++;
    if (on0 == on1) begin failures++; $display("FAIL %s: no transition on the on-path", path); end
    if (has_off) begin
      checks++;
      if (off0 != off1) begin failures++; $display("FAIL %s: off-path changed", path); end
    end
  endtask

  // Observation paths to a primary output.
  task automatic obs_r1(input string path, input logic [15:0] exp);
    lwf_ctrl_t c = hold_all();
    c.m2_sel = 1'b1;               // R1 -> m2 -> Add1; m3/m4 bring PI2 = 0
    cyc('0, '0, c);
    n_thru_pi++;
    chk({path, " PO1"}, po1, exp);
  endtask
  task automatic obs_r2(input string path, input logic [15:0] exp);
    lwf_ctrl_t c = hold_all();
    c.m3_sel = 1'b1;               // R2 -> m3 -> m4 -> Add1; m1/m2 bring PI1 = 0
    cyc('0, '0, c);
    n_thru_pi++;
    chk({path, " PO1"}, po1, exp);
  endtask
  task automatic obs_r3(input string path, input logic [15:0] exp);
    lwf_ctrl_t c = hold_all();
    c.m4_sel = 1'b1;               // R3 -> m4 -> Add1; m1/m2 bring PI1 = 0
    cyc('0, '0, c);
    n_thru_pi++;
    chk({path, " PO1"}, po1, exp);
  endtask

  // Tests of the paths that end in Add1 (R5 or, through m5, R1).
  // id: path number; capture_r1 chooses R1 as the ending register.
  task automatic test_add1_pi1(input int id, input bit capture_r1,
                               input logic [15:0] a, input logic [15:0] b, input logic [15:0] c);
    lwf_ctrl_t t = hold_all();
    string nm = $sformatf("path %0d PI1-m1-m2-Add1-%s", id, capture_r1 ? "m5-R1" : "R5");
    cyc(a, c, t);
    if (capture_r1) t.r1_ld = 1'b1;
    cyc(b, c, t);
    spc(nm, s_prev.a1a, s_cur.a1a, 1, s_prev.a1b, s_cur.a1b);
    n_cond1++;
    if (capture_r1) begin chk(nm, dut.r1, b + c); obs_r1(nm, b + c); end
    else            chk(nm, po1, b + c);
    n_tests[id]++;
  endtask

  task automatic test_add1_pi2(input int id, input bit capture_r1,
                               input logic [15:0] a, input logic [15:0] b, input logic [15:0] c);
    lwf_ctrl_t t = hold_all();
    string nm = $sformatf("path %0d PI2-m3-m4-Add1-%s", id, capture_r1 ? "m5-R1" : "R5");
    cyc(c, a, t);
    if (capture_r1) t.r1_ld = 1'b1;
    cyc(c, b, t);
    spc(nm, s_prev.a1b, s_cur.a1b, 1, s_prev.a1a, s_cur.a1a);
    n_cond1++;
    if (capture_r1) begin chk(nm, dut.r1, b + c); obs_r1(nm, b + c); end
    else            chk(nm, po1, b + c);
    n_tests[id]++;
  endtask

  // R1 on-path through m1 (via_m2 = 0) or directly into m2 (via_m2 = 1).
  // Off-path: R2 through m3/m4, loaded from PI1 (disjoint from PI2-MUX-R1).
  task automatic test_add1_r1(input int id, input bit via_m2, input bit capture_r1,
                              input logic [15:0] a, input logic [15:0] b, input logic [15:0] c);
    lwf_ctrl_t t = hold_all();
    string nm = $sformatf("path %0d R1-%s-Add1-%s", id, via_m2 ? "m2" : "m1-m2",
                          capture_r1 ? "m5-R1" : "R5");
    t.tmux_sel = 1'b1; t.r1_ld = 1'b1; t.r2_ld = 1'b1;
    cyc(c, a, t);                  // R1 <= V1 over the test path, R2 <= off value
    t.r2_ld = 1'b0;
    if (via_m2) t.m2_sel = 1'b1; else t.m1_sel = 1'b1;
    t.m3_sel = 1'b1;
    cyc('0, b, t);                 // V1 on the on-path; R1 <= V2
    t.tmux_sel = 1'b0; t.r1_ld = capture_r1;
    cyc('0, '0, t);                // V2 on the on-path; ending register captures
    spc(nm, s_prev.a1a, s_cur.a1a, 1, s_prev.a1b, s_cur.a1b);
    n_cond1++;
    if (capture_r1) begin chk(nm, dut.r1, b + c); obs_r1(nm, b + c); end
    else            chk(nm, po1, b + c);
    n_tests[id]++;
  endtask

  // R2 on-path through m3/m4. Off-path R1 through m2, held (condition 4).
  task automatic test_add1_r2(input int id, input bit capture_r1,
                              input logic [15:0] a, input logic [15:0] b, input logic [15:0] c);
    lwf_ctrl_t t = hold_all();
    string nm = $sformatf("path %0d R2-m3-m4-Add1-%s", id, capture_r1 ? "m5-R1" : "R5");
    t.tmux_sel = 1'b1; t.r1_ld = 1'b1; t.r2_ld = 1'b1;
    cyc(a, c, t);                  // R1 <= off value, R2 <= V1
    t.tmux_sel = 1'b0; t.r1_ld = 1'b0;
    t.m2_sel = 1'b1; t.m3_sel = 1'b1;
    cyc(b, '0, t);                 // R2 <= V2 while R1 holds
    if (dut.r1 == c && s_cur.a1a == c) n_r1_hold++;
    t.r2_ld = 1'b0; t.r1_ld = capture_r1;
    cyc('0, '0, t);
    spc(nm, s_prev.a1b, s_cur.a1b, 1, s_prev.a1a, s_cur.a1a);
    n_cond4++;
    if (capture_r1) begin chk(nm, dut.r1, b + c); obs_r1(nm, b + c); end
    else            chk(nm, po1, b + c);
    n_tests[id]++;
  endtask

  // R3 on-path through m4. Off-path PI1 through m1/m2, held at the PI.
  task automatic test_add1_r3(input int id, input bit capture_r1,
                              input logic [15:0] a, input logic [15:0] b, input logic [15:0] c);
    lwf_ctrl_t t = hold_all();
    string nm = $sformatf("path %0d R3-m4-Add1-%s", id, capture_r1 ? "m5-R1" : "R5");
    t.r3_ld = 1'b1;
    cyc(c, a, t);                  // R3 <= V1
    t.m4_sel = 1'b1;
    cyc(c, b, t);                  // R3 <= V2
    t.r3_ld = 1'b0; t.r1_ld = capture_r1;
    cyc(c, '0, t);
    spc(nm, s_prev.a1b, s_cur.a1b, 1, s_prev.a1a, s_cur.a1a);
    n_cond1++;
    if (capture_r1) begin chk(nm, dut.r1, b + c); obs_r1(nm, b + c); end
    else            chk(nm, po1, b + c);
    n_tests[id]++;
  endtask

  task automatic run_all_paths();
    logic [15:0] a, b, c;
    lwf_ctrl_t t;
    string nm;
    a = 16'($urandom); b = 16'($urandom); c = 16'($urandom);
    if (a == b) b = ~a;

    // 1: PI1-R2, observed over m3-m4-Add1-R5.
    t = hold_all(); t.r2_ld = 1'b1;
    cyc(a, '0, t); cyc(b, '0, t);
    nm = "path 1 PI1-R2";
    spc(nm, s_prev.pi1, s_cur.pi1, 0, '0, '0);
    chk(nm, dut.r2, b); obs_r2(nm, b); n_tests[1]++;

    test_add1_pi1(2, 1'b0, a, b, c);
    test_add1_pi1(3, 1'b1, a, b, c);

    // 4: PI2-R3, observed over m4-Add1-R5.
    t = hold_all(); t.r3_ld = 1'b1;
    cyc('0, a, t); cyc('0, b, t);
    nm = "path 4 PI2-R3";
    spc(nm, s_prev.pi2, s_cur.pi2, 0, '0, '0);
    chk(nm, dut.r3, b); obs_r3(nm, b); n_tests[4]++;

    test_add1_pi2(5, 1'b0, a, b, c);
    test_add1_pi2(6, 1'b1, a, b, c);
    test_add1_r1(7, 1'b0, 1'b0, a, b, c);
    test_add1_r1(8, 1'b0, 1'b1, a, b, c);
    test_add1_r1(9, 1'b1, 1'b0, a, b, c);
    test_add1_r1(10, 1'b1, 1'b1, a, b, c);

    // 11: R1-Add2-R4, off-path R2 loaded from PI1 (disjoint control paths).
    nm = "path 11 R1-Add2-R4";
    t = hold_all(); t.tmux_sel = 1'b1; t.r1_ld = 1'b1; t.r2_ld = 1'b1;
    cyc(c, a, t);
    t.r2_ld = 1'b0;
    cyc('0, b, t);
    t = hold_all(); t.r4_ld = 1'b1;
    cyc('0, '0, t);
    spc(nm, s_prev.a2a, s_cur.a2a, 1, s_prev.a2b, s_cur.a2b);
    n_cond1++;
    chk(nm, dut.r4, b + c); chk({nm, " PO2"}, po2, b + c); n_tests[11]++;

    // 12: R1-Mult1-m5-R1 (no off-path), observed over m2-Add1-R5.
    nm = "path 12 R1-Mult1-m5-R1";
    t = hold_all(); t.tmux_sel = 1'b1; t.r1_ld = 1'b1;
    cyc('0, a, t); cyc('0, b, t);
    t.tmux_sel = 1'b0; t.m5_sel = 1'b1;
    cyc('0, '0, t);
    spc(nm, s_prev.mul_in, s_cur.mul_in, 0, '0, '0);
    chk(nm, dut.r1, b * K); obs_r1(nm, b * K); n_tests[12]++;

    // 13: R2-Add2-R4, off-path R1 held (the hold function the DFT adds).
    nm = "path 13 R2-Add2-R4";
    t = hold_all(); t.tmux_sel = 1'b1; t.r1_ld = 1'b1; t.r2_ld = 1'b1;
    cyc(a, c, t);                  // R1 <= off value over PI2-MUX-R1, R2 <= V1
    t.tmux_sel = 1'b0; t.r1_ld = 1'b0;
    cyc(b, '0, t);                 // R2 <= V2, R1 holds
    if (dut.r1 == c && s_cur.a2a == c) n_r1_hold++;
    t = hold_all(); t.r4_ld = 1'b1;
    cyc('0, '0, t);
    spc(nm, s_prev.a2b, s_cur.a2b, 1, s_prev.a2a, s_cur.a2a);
    n_cond4++;
    chk(nm, dut.r4, b + c); chk({nm, " PO2"}, po2, b + c); n_tests[13]++;

    test_add1_r2(14, 1'b0, a, b, c);
    test_add1_r2(15, 1'b1, a, b, c);
    test_add1_r3(16, 1'b0, a, b, c);
    test_add1_r3(17, 1'b1, a, b, c);

    // 18: R4-PO2. R4 receives V1 then V2 from R2 over Add2 with R1 = 0.
    nm = "path 18 R4-PO2";
    t = hold_all(); t.tmux_sel = 1'b1; t.r1_ld = 1'b1; t.r2_ld = 1'b1;
    cyc(a, '0, t);                 // R1 <= 0, R2 <= V1
    t = hold_all(); t.r2_ld = 1'b1; t.r4_ld = 1'b1;
    cyc(b, '0, t);                 // R4 <= V1, R2 <= V2
    n_thru_pi++;
    chk({nm, " V1"}, po2, a);
    t.r2_ld = 1'b0;
    cyc('0, '0, t);                // R4 <= V2
    chk({nm, " V2"}, po2, b); n_tests[18]++;

    // 19: R5-PO1. R5 receives V1 then V2 from PI1 over Add1 with PI2 = 0.
    nm = "path 19 R5-PO1";
    t = hold_all();
    cyc(a, '0, t); chk({nm, " V1"}, po1, a);
    cyc(b, '0, t); chk({nm, " V2"}, po1, b); n_tests[19]++;
  endtask

  initial begin
    lwf_ctrl_t c;
    for (int i = 1; i <= 19; i++) n_tests[i] = 0;
    pi1 = '0; pi2 = '0; ctrl = hold_all();
    mdl = '0;
    s_cur = '0;
    #12;
    chk("reset PO1", po1, '0);
    chk("reset PO2", po2, '0);
    rst_n = 1'b1;
    @(negedge clk);

    // Part 1: SPC two-pattern tests of all RTL paths.
    model_on = 1'b1;
    for (int r = 0; r < ROUNDS; r++) run_all_paths();

    // Part 2: random normal operation against the reference model.
    for (int i = 0; i < 3000; i++) begin
      c = lwf_ctrl_t'($urandom);
      c.mask_add1_a = 1'b0; c.mask_add1_b = 1'b0;
      c.mask_add2_a = 1'b0; c.mask_add2_b = 1'b0; c.mult_thru = 1'b0;
      pi1 = 16'($urandom); pi2 = 16'($urandom);
      if (!c.r1_ld && dut.r1 != r1_next_normal(c)) n_r1_hold++;
      cyc(pi1, pi2, c);
    end

    // Every mechanism must have happened.
    for (int i = 1; i <= 19; i++) begin
      checks++;
      if (n_tests[i] != ROUNDS) begin failures++; $display("FAIL path %0d tested %0d times", i, n_tests[i]); end
    end
    checks += 7;
    if (n_r1_hold == 0)      begin failures++; $display("FAIL R1 hold never used"); end
    if (n_tmux == 0)         begin failures++; $display("FAIL DFT test path never used"); end
    if (n_mult_route == 0)   begin failures++; $display("FAIL Mult1 route never used"); end
    if (n_thru_pi == 0)      begin failures++; $display("FAIL thru by PI never used"); end
    if (n_cond1 == 0)        begin failures++; $display("FAIL condition 1 never used"); end
    if (n_cond4 == 0)        begin failures++; $display("FAIL condition 4 never used"); end
    if (n_model_cycles == 0) begin failures++; $display("FAIL model never compared"); end
    $display("SPC tests per path: %0d; R1 holds %0d, test-path loads %0d, Mult1 routes %0d, thru by PI %0d, cond1 %0d, cond4 %0d, model cycles %0d",
             ROUNDS, n_r1_hold, n_tmux, n_mult_route, n_thru_pi, n_cond1, n_cond4, n_model_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Value R1 would load in normal operation under control word c (used only
  // to count holds that keep a different value).
  function automatic logic [15:0] r1_next_normal(lwf_ctrl_t c);
    lwf_regs_t n;
    lwf_ctrl_t l = c;
    l.r1_ld = 1'b1;
    n = lwf_step(mdl, pi1, pi2, l, 1'b0, 1'b0, BW, K);
    return n.r1;
  endfunction
endmodule
