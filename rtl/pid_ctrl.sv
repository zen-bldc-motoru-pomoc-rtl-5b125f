// pid_ctrl - speed PID controller with set-point weighting and a filtered
// derivative, one update per tick.
//
// On every tick the controller computes, with SP the set-point and PV the
// measured speed (both Q16.16 rpm):
//   e   = SP - PV          e'  = beta*SP - PV        e'' = gamma*SP - PV
//   uP  = Kp * e'
//   uI  = uI + Ki * (e(k) + e(k-1)) / 2                 (trapezoidal sum)
//   uD  = Kd * (e''(k) - e''(k-1)) + a * uD(k-1)
//   u   = uP + uI + uD, limited to [out_low, out_high]
// These equations and the output limits are those of the original speed
// loop; fixed point (Q8.24 gains, 48-bit intermediates) instead of single
// precision, and clamping the integral to the output range (anti-windup), are
// choices of this design.
//
// clr resets the integral, the derivative state and the stored errors; the
// first update after clr uses e(k-1) = e(k) and e''(k-1) = e''(k), so the
// controller starts without a derivative or integral kick (bumpless start
// when the drive leaves the safe state). u is registered and valid one clock
// after tick; done pulses on that clock.
module pid_ctrl
  import bldc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     clr,
  input  logic     tick,
  input  q16_t     sp,
  input  q16_t     pv,
  input  pid_cfg_t cfg,
  output q16_t     u,
  output logic     done
);

  typedef logic signed [47:0] acc_t;

  acc_t e_prev, e2_prev, ui, ud;
  logic first;

  // Q16.16 x Q8.24 -> Q16.16 in 48 bits
  function automatic acc_t mulq(input acc_t x, input q24_t k);
    logic signed [79:0] p;
    p = x * k;
    return acc_t'(p >>> 24);
  endfunction

  function automatic acc_t clamp(input acc_t x, input q16_t lo, input q16_t hi);
    if (x > acc_t'(hi)) return acc_t'(hi);
    if (x < acc_t'(lo)) return acc_t'(lo);
    return x;
  endfunction

  acc_t e, e1, e2, ep, e2p, up, ui_n, ud_n, u_n;

  always_comb begin
    e    = acc_t'(sp) - acc_t'(pv);
    e1   = mulq(acc_t'(sp), cfg.beta) - acc_t'(pv);
    e2   = mulq(acc_t'(sp), cfg.gamma) - acc_t'(pv);
    ep   = first ? e  : e_prev;
    e2p  = first ? e2 : e2_prev;
    up   = mulq(e1, cfg.kp);
    ui_n = clamp(ui + mulq((e + ep) >>> 1, cfg.ki), cfg.out_low, cfg.out_high);
    ud_n = mulq(e2 - e2p, cfg.kd) + mulq(ud, cfg.a);
    u_n  = clamp(up + ui_n + ud_n, cfg.out_low, cfg.out_high);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_prev <= '0; e2_prev <= '0; ui <= '0; ud <= '0;
      first <= 1'b1; u <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clr) begin
        e_prev <= '0; e2_prev <= '0; ui <= '0; ud <= '0;
        first <= 1'b1;
        u <= cfg.out_low;
      end else if (tick) begin
        e_prev  <= e;
        e2_prev <= e2;
        ui      <= ui_n;
        ud      <= ud_n;
        first   <= 1'b0;
        u       <= q16_t'(u_n);
        done    <= 1'b1;
      end
    end
  end

endmodule
