// tb_bemf_observer - checks the back-EMF observer in two ways.
//  1. Arithmetic: 400 updates with random phase currents, modes, supply and
//     coefficients, compared bit for bit with a reference model of the update
//     equations written independently here (64-bit integers, floor shifts).
//  2. Behaviour: a line-level motor circuit with fixed back EMFs (8 V on ab,
//     -3 V on bc and therefore -5 V on ca) is simulated in real
//     arithmetic at a 40 us sample period with R = 25.5 Ohm and L = 8.32 mH.
//     The observer, given only the mode, the supply and the currents, must
//     estimate every line EMF to within 1 % after 250 samples, and again after
//     the EMFs step to new values.
// Also checks the one-clock latency of out_valid and that clr zeroes the
// estimates.
module tb_bemf_observer;
  import bldc_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, iv = 0, ov;
  q16_t ia, ib, ic, e_ab, e_bc, e_ca, ih_ab, ih_bc, ih_ca;
  mode_t mode;
  logic [15:0] vbus;
  obs_cfg_t cfg;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  bemf_observer dut (.clk, .rst_n, .clr, .in_valid(iv), .ia, .ib, .ic, .mode,
    .vbus_mv(vbus), .cfg, .e_ab, .e_bc, .e_ca, .ih_ab, .ih_bc, .ih_ca, .out_valid(ov));

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

  // ---------------- reference model ----------------
  longint m_ih[3], m_acc[3], m_e[3];

  function automatic longint fx(input longint k, input longint x);   // Q8.24 * Q16.16
    return (k * x) >>> 24;
  endfunction
  function automatic longint clampv(input longint x, input longint m);
    return (x > m) ? m : (x < -m) ? -m : x;
  endfunction
  function automatic int phase_sf(input mode_t m, input int ph);
    // +1 upper on, -1 lower on, 0 floating; modes I..VI = CB AB AC BC BA CA
    int up, lo;
    case (m)
      1: begin up = 2; lo = 1; end
      2: begin up = 0; lo = 1; end
      3: begin up = 0; lo = 2; end
      4: begin up = 1; lo = 2; end
      5: begin up = 1; lo = 0; end
      6: begin up = 2; lo = 0; end
      default: begin up = -1; lo = -1; end
    endcase
    return (ph == up) ? 1 : (ph == lo) ? -1 : 0;
  endfunction

  task automatic model_step();
    longint il[3], vl[3], vmax, err, x, y;
    int s[3];
    for (int p = 0; p < 3; p++) s[p] = phase_sf(mode, p);
    il[0] = longint'(ia) - longint'(ib);
    il[1] = longint'(ib) - longint'(ic);
    il[2] = longint'(ic) - longint'(ia);
    il[0] = longint'(int'(il[0])); il[1] = longint'(int'(il[1])); il[2] = longint'(int'(il[2]));
    for (int k = 0; k < 3; k++) vl[k] = longint'(vbus) * 32768 * (s[k] - s[(k + 1) % 3]);
    vmax = longint'(vbus) * 65536;
    for (int k = 0; k < 3; k++) begin
      err = m_ih[k] - il[k];
      m_acc[k] = clampv(m_acc[k] + fx(cfg.ki, err), vmax);
      m_e[k]   = clampv(fx(cfg.kp, err) + m_acc[k], vmax);
      x = m_ih[k] + fx(cfg.b, vl[k] - m_e[k]) - fx(cfg.a, m_ih[k]);
      y = 64'sh7FFF_FFFF;
      m_ih[k] = (x > y) ? y : (x < -y) ? -y : x;
    end
  endtask

  task automatic update();
    @(negedge clk); iv = 1; @(negedge clk); iv = 0;
    chk(ov, "out_valid one clock after in_valid");
    @(negedge clk);
    chk(!ov, "out_valid is a single pulse");
  endtask

  // ---------------- line circuit plant ----------------
  real p_i[3], p_e[3];
  localparam real DT = 40e-6, R = 25.5, L = 8.32e-3;

  task automatic plant_run(input int n);
    real v[3];
    int s[3];
    for (int p = 0; p < 3; p++) s[p] = phase_sf(mode, p);
    for (int k = 0; k < n; k++) begin
      real ab, bc;
      for (int j = 0; j < 3; j++) v[j] = real'(vbus) / 2.0 * (s[j] - s[(j + 1) % 3]);
      for (int j = 0; j < 2; j++) p_i[j] = p_i[j] + DT / L * (v[j] - R * p_i[j] - p_e[j]);
      p_i[2] = -p_i[0] - p_i[1];
      ab = p_i[0]; bc = p_i[1];
      ia = q16_t'($rtoi((2.0 * ab + bc) / 3.0 * 65536.0));
      ib = q16_t'($rtoi((bc - ab) / 3.0 * 65536.0));
      ic = -ia - ib;
      update();
    end
  endtask

  function automatic q24_t q24(input real r);
    return q24_t'($rtoi(r * 16777216.0));
  endfunction

  initial begin
    ia = '0; ib = '0; ic = '0; mode = 3'd2; vbus = 16'd18000; cfg = '0;
    for (int k = 0; k < 3; k++) begin m_ih[k] = 0; m_acc[k] = 0; m_e[k] = 0; end
    repeat (3) @(negedge clk); rst_n = 1;

    // 1. bit-exact arithmetic
    for (int n = 0; n < 400; n++) begin
      if (n % 50 == 0) begin
        cfg.a  = q24_t'($urandom_range(0, 1 << 23));
        cfg.b  = q24_t'($urandom_range(0, 1 << 20));
        cfg.kp = q24_t'($urandom_range(0, 16 << 24));
        cfg.ki = q24_t'($urandom_range(0, 4 << 24));
        vbus   = 16'($urandom_range(1000, 30000));
      end
      mode = mode_t'($urandom_range(0, 7));
      ia = q16_t'($signed($urandom_range(0, 1 << 26)) - (1 << 25));
      ib = q16_t'($signed($urandom_range(0, 1 << 26)) - (1 << 25));
      ic = q16_t'($signed($urandom_range(0, 1 << 26)) - (1 << 25));
      model_step();
      update();
      chk(longint'(e_ab) == m_e[0] && longint'(e_bc) == m_e[1] && longint'(e_ca) == m_e[2],
          $sformatf("update %0d: e %0d %0d %0d, expected %0d %0d %0d", n,
                    e_ab, e_bc, e_ca, m_e[0], m_e[1], m_e[2]));
      chk(longint'(ih_ab) == m_ih[0] && longint'(ih_bc) == m_ih[1] && longint'(ih_ca) == m_ih[2],
          $sformatf("update %0d: model currents differ", n));
    end

    // clear
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    chk(e_ab == 0 && e_bc == 0 && e_ca == 0 && ih_ab == 0, "clr zeroes the states");

    // 2. convergence on the line circuit (gates: double pole at 2000 rad/s)
    vbus    = 16'd18000;
    mode    = 3'd2;
    cfg.a   = q24(DT * R / L);
    cfg.b   = q24(DT / L);
    cfg.kp  = q24(4000.0 * L - R);
    cfg.ki  = q24(4.0e6 * L * DT);
    p_i[0] = 0.0; p_i[1] = 0.0; p_i[2] = 0.0;
    p_e[0] = 8000.0; p_e[1] = -3000.0; p_e[2] = -5000.0;
    plant_run(250);
    chk(e_ab > q16_t'(7920 * 65536) && e_ab < q16_t'(8080 * 65536), $sformatf("e_ab %0d mV", e_ab >>> 16));
    chk(e_bc < q16_t'(-2970 * 65536) && e_bc > q16_t'(-3030 * 65536), $sformatf("e_bc %0d mV", e_bc >>> 16));
    chk(e_ca < q16_t'(-4950 * 65536) && e_ca > q16_t'(-5050 * 65536), $sformatf("e_ca %0d mV", e_ca >>> 16));
    // EMF step and a different mode
    mode = 3'd4;
    p_e[0] = -4000.0; p_e[1] = 6000.0; p_e[2] = -2000.0;
    plant_run(250);
    chk(e_ab < q16_t'(-3960 * 65536) && e_ab > q16_t'(-4040 * 65536), $sformatf("e_ab %0d mV after step", e_ab >>> 16));
    chk(e_bc > q16_t'(5940 * 65536) && e_bc < q16_t'(6060 * 65536), $sformatf("e_bc %0d mV after step", e_bc >>> 16));
    chk(e_ca < q16_t'(-1980 * 65536) && e_ca > q16_t'(-2020 * 65536), $sformatf("e_ca %0d mV after step", e_ca >>> 16));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
