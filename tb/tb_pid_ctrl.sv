// tb_pid_ctrl - drives the PID with random speeds and compares every
// output with a real-number evaluation of the same control law (weighted
// P term, trapezoidal integral clamped to the output range, filtered
// derivative, output limits). Also checks the one-clock latency, that the
// limits are reached, and that a cleared controller restarts without a
// derivative kick.
module tb_pid_ctrl;
  import bldc_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, tick = 0, done;
  q16_t sp, pv, u;
  pid_cfg_t cfg;
  int checks = 0, failures = 0, n_hi = 0, n_lo = 0;
  always #5 clk = ~clk;

  pid_ctrl dut (.clk, .rst_n, .clr, .tick, .sp, .pv, .cfg, .u, .done);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic q24_t g24(input real v); return q24_t'($rtoi(v * 16777216.0)); endfunction
  function automatic q16_t g16(input real v); return q16_t'($rtoi(v * 65536.0)); endfunction
  function automatic real r24(input q24_t v); return real'(v) / 16777216.0; endfunction
  function automatic real r16(input q16_t v); return real'(v) / 65536.0; endfunction
  function automatic real lim(input real v, input real lo, input real hi);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // reference state
  real m_ui, m_ud, m_ep, m_e2p;
  bit  m_first;

  task automatic model_clear(); m_ui = 0; m_ud = 0; m_first = 1; endtask

  function automatic real model_step(input real s, input real p);
    real e, e1, e2, up, uo, lo, hi;
    lo = r16(cfg.out_low); hi = r16(cfg.out_high);
    e  = s - p;
    e1 = r24(cfg.beta) * s - p;
    e2 = r24(cfg.gamma) * s - p;
    if (m_first) begin m_ep = e; m_e2p = e2; end
    up   = r24(cfg.kp) * e1;
    m_ui = lim(m_ui + r24(cfg.ki) * (e + m_ep) / 2.0, lo, hi);
    m_ud = r24(cfg.kd) * (e2 - m_e2p) + r24(cfg.a) * m_ud;
    uo   = lim(up + m_ui + m_ud, lo, hi);
    m_ep = e; m_e2p = e2; m_first = 0;
    return uo;
  endfunction

  task automatic step(input real s, input real p);
    real exp_u, tol;
    @(negedge clk); sp = g16(s); pv = g16(p); tick = 1;
    @(negedge clk); tick = 0;
    chk(done, "done one clock after tick");
    exp_u = model_step(r16(sp), r16(pv));
    tol = 2.0e-3;
    chk((r16(u) - exp_u) < tol && (exp_u - r16(u)) < tol,
        $sformatf("sp %f pv %f: u %f expected %f", r16(sp), r16(pv), r16(u), exp_u));
    if (u == cfg.out_high) n_hi++;
    if (u == cfg.out_low)  n_lo++;
  endtask

  initial begin
    cfg.kp = g24(0.0005); cfg.ki = g24(1.0e-5); cfg.kd = g24(0.0005);
    cfg.a = g24(0.5); cfg.beta = g24(1.0); cfg.gamma = g24(0.8);
    cfg.out_high = g16(0.7); cfg.out_low = g16(0.001);
    sp = '0; pv = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    model_clear();
    for (int k = 0; k < 200; k++) step(1000.0, 900.0 + real'($urandom_range(0, 200)));
    // large errors to hit both limits
    for (int k = 0; k < 40; k++) step(3000.0, 100.0);
    for (int k = 0; k < 80; k++) step(100.0, 3000.0);
    chk(n_hi > 0 && n_lo > 0, "both output limits reached");
    // the configuration shown for the original drive: Kc = 0, Ti term 1e-6, D 0.002
    cfg.kp = g24(0.0); cfg.ki = g24(1.0e-6); cfg.kd = g24(0.002); cfg.a = g24(0.0);
    cfg.gamma = g24(1.0);
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    model_clear();
    // bumpless: first update after clear has no derivative contribution
    step(1000.0, 0.0);
    chk(r16(u) < 0.002, $sformatf("no derivative kick after clear, u=%f", r16(u)));
    for (int k = 0; k < 100; k++) step(1000.0, 950.0 + real'($urandom_range(0, 100)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
