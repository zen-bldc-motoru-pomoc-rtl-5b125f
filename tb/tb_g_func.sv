// tb_g_func - the sensorless G function against a real-number model of
//   H_xy = Vbus/2*(SF_x - SF_y) - R*i_xy - (L/dt)*(i_xy(k) - i_xy(k-1))
//   G = H_ca/H_bc (modes I, IV), H_bc/H_ab (II, V), H_ab/H_ca (III, VI)
// for random currents and modes (negative G reads 0), the division
// latency, and the threshold/hysteresis detector: one trigger per crossing,
// no re-arm until G falls below threshold - hysteresis.
module tb_g_func;
  import bldc_pkg::*;
  logic clk = 0, rst_n = 0, iv = 0, gv, trig, busy;
  q16_t ia, ib, ic, g;
  mode_t mode;
  g_cfg_t cfg;
  int checks = 0, failures = 0, ntrig = 0;
  always #5 clk = ~clk;

  g_func dut (.clk, .rst_n, .in_valid(iv), .ia, .ib, .ic, .mode, .cfg, .g, .g_valid(gv),
              .trigger(trig), .busy);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (trig) ntrig++;

  function automatic real rq(input q16_t v); return real'(v) / 65536.0; endfunction
  function automatic q16_t qr(input real v); return q16_t'($rtoi(v * 65536.0)); endfunction

  // switching function per mode for phases a, b, c
  function automatic int sfm(input int m, input int ph);
    int t [7][3] = '{'{0,0,0}, '{0,-1,1}, '{1,-1,0}, '{1,0,-1}, '{0,1,-1}, '{-1,1,0}, '{-1,0,1}};
    return t[m][ph];
  endfunction

  real pab, pbc, pca;   // previous line currents of the model

  function automatic real model_g(input int m, input real a, input real b, input real c,
                                  input bit upd);
    real vb, r, ldt, k, iab, ibc, ica, hab, hbc, hca, gg;
    vb = real'(cfg.vbus_mv); r = rq(cfg.r_ohm); ldt = rq(cfg.l_per_dt); k = real'(cfg.i_upscale);
    iab = k * (a - b); ibc = k * (b - c); ica = k * (c - a);
    hab = vb / 2.0 * real'(sfm(m, 0) - sfm(m, 1)) - r * iab - ldt * (iab - pab);
    hbc = vb / 2.0 * real'(sfm(m, 1) - sfm(m, 2)) - r * ibc - ldt * (ibc - pbc);
    hca = vb / 2.0 * real'(sfm(m, 2) - sfm(m, 0)) - r * ica - ldt * (ica - pca);
    if (upd) begin pab = iab; pbc = ibc; pca = ica; end
    case (m)
      1, 4: gg = hca / hbc;
      2, 5: gg = hbc / hab;
      default: gg = hab / hca;
    endcase
    return (gg < 0.0) ? 0.0 : gg;
  endfunction

  task automatic sample(input int m, input real a, input real b, input real c, output int lat);
    @(negedge clk); mode = mode_t'(m); ia = qr(a); ib = qr(b); ic = qr(c); iv = 1;
    @(negedge clk); iv = 0; lat = 1;
    while (!gv && lat < 200) begin @(negedge clk); lat++; end
  endtask

  // currents that make the denominator H equal dv and the numerator nv (L/dt = 0)
  task automatic craft(input int m, input real dv, input real nv, output real a, output real b, output real c);
    real vab, vbc, vca, r;
    r = rq(cfg.r_ohm);
    vab = real'(cfg.vbus_mv) / 2.0 * real'(sfm(m, 0) - sfm(m, 1));
    vbc = real'(cfg.vbus_mv) / 2.0 * real'(sfm(m, 1) - sfm(m, 2));
    vca = real'(cfg.vbus_mv) / 2.0 * real'(sfm(m, 2) - sfm(m, 0));
    a = 0; b = 0; c = 0;
    case (m)
      1, 4: begin b = (vbc - dv) / r; a = (nv - vca) / r; end
      2, 5: begin a = (vab - dv) / r; c = (nv - vbc) / r; end
      default: begin c = (vca - dv) / r; b = (nv - vab) / r; end
    endcase
  endtask

  int lat, n0, m;
  real a, b, c, e;
  initial begin
    cfg.i_upscale = 8'd10; cfg.vbus_mv = 16'd18000; cfg.r_ohm = qr(25.5);
    cfg.l_per_dt = qr(0.0083 * 100000.0); cfg.threshold = qr(20.0); cfg.hysteresis = qr(2.0);
    mode = '0; ia = '0; ib = '0; ic = '0;
    pab = 0; pbc = 0; pca = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      m = int'($urandom_range(1, 6));
      a = real'($urandom_range(0, 600)) - 300.0; b = real'($urandom_range(0, 600)) - 300.0;
      c = -(a + b) + (real'($urandom_range(0, 20)) - 10.0);
      sample(m, a, b, c, lat);
      e = model_g(m, rq(qr(a)), rq(qr(b)), rq(qr(c)), 1'b1);
      chk(lat == 82, $sformatf("latency %0d", lat));
      if (e > 32000.0) chk(g == 32'sh7FFF_FFFF || rq(g) > 31000.0, "saturation");
      else chk(rq(g) - e <= 1e-3 * e + 1e-3 && e - rq(g) <= 1e-3 * e + 1e-3,
               $sformatf("mode %0d: G %f expected %f", m, rq(g), e));
    end
    // detector
    cfg.l_per_dt = '0; cfg.i_upscale = 8'd1;
    for (int mm = 1; mm <= 6; mm++) begin
      sample(mm, 0.0, 0.0, 0.0, lat);
      chk(g == '0, "zero currents give G = 0");
      n0 = ntrig;
      craft(mm, 100.0, 5000.0, a, b, c);
      sample(mm, a, b, c, lat); repeat (2) @(negedge clk);
      chk(rq(g) > 49.0 && rq(g) < 51.0, $sformatf("crafted G %f", rq(g)));
      chk(ntrig == n0 + 1, "crossing gives one trigger");
      sample(mm, a, b, c, lat); repeat (2) @(negedge clk);
      chk(ntrig == n0 + 1, "no second trigger while high");
      craft(mm, 100.0, 1900.0, a, b, c);        // G = 19: inside the hysteresis band
      sample(mm, a, b, c, lat);
      craft(mm, 100.0, 5000.0, a, b, c);
      sample(mm, a, b, c, lat); repeat (2) @(negedge clk);
      chk(ntrig == n0 + 1, "no re-arm inside the hysteresis band");
      craft(mm, 100.0, 1000.0, a, b, c);        // G = 10: re-arms
      sample(mm, a, b, c, lat);
      craft(mm, 100.0, 5000.0, a, b, c);
      sample(mm, a, b, c, lat); repeat (2) @(negedge clk);
      chk(ntrig == n0 + 2, "re-armed below threshold - hysteresis");
      sample(mm, 0.0, 0.0, 0.0, lat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
