// Cycle-level reference model of the LWF data path with its DFT elements,
// written from the data path equations, for the testbenches. Values are
// carried in 16 bits and cut to the simulated width bw.
package lwf_model_pkg;
  import spc_dft_pkg::*;

  typedef struct packed {
    logic [15:0] r1, r2, r3, r4, r5;
  } lwf_regs_t;

  function automatic logic [15:0] cut(logic [31:0] v, int bw);
    logic [31:0] m;
    m = (32'd1 << bw) - 32'd1;
    return 16'(v & m);
  endfunction

  // Next register state after one rising clock edge.
  function automatic lwf_regs_t lwf_step(lwf_regs_t s, logic [15:0] p1, logic [15:0] p2,
                                         lwf_ctrl_t c, bit masks, bit bypass, int bw,
                                         logic [15:0] k);
    logic [15:0] m1, m2, m3, m4, a1a, a1b, a2a, a2b, add1, add2, mul, m5, r1d;
    lwf_regs_t n;
    m1  = c.m1_sel ? s.r1 : p1;
    m2  = c.m2_sel ? s.r1 : m1;
    m3  = c.m3_sel ? s.r2 : p2;
    m4  = c.m4_sel ? s.r3 : m3;
    a1a = (masks && c.mask_add1_a) ? 16'd0 : m2;
    a1b = (masks && c.mask_add1_b) ? 16'd0 : m4;
    a2a = (masks && c.mask_add2_a) ? 16'd0 : s.r1;
    a2b = (masks && c.mask_add2_b) ? 16'd0 : s.r2;
    add1 = cut(32'(a1a) + 32'(a1b), bw);
    add2 = cut(32'(a2a) + 32'(a2b), bw);
    mul  = cut(32'(s.r1) * 32'(k), bw);
    if (bypass && c.mult_thru) mul = s.r1;
    m5  = c.m5_sel ? mul : add1;
    r1d = c.tmux_sel ? p2 : m5;
    n.r1 = c.r1_ld ? r1d : s.r1;
    n.r2 = c.r2_ld ? p1 : s.r2;
    n.r3 = c.r3_ld ? p2 : s.r3;
    n.r4 = c.r4_ld ? add2 : s.r4;
    n.r5 = add1;
    return n;
  endfunction
endpackage
