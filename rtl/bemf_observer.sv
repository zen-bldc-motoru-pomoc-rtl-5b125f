// bemf_observer - back-EMF observer for the three line pairs ab, bc, ca.
//
// Each line xy carries a current model of the winding pair,
//   L di/dt = v_xy - R i - e_xy,
// driven by the line voltage of the applied mode and by the estimated back
// EMF e_xy. The model current is compared with the measured line current
// i_xy = i_x - i_y, and a PI correction of the difference becomes the
// estimate:
//   err     = i_hat - i_xy
//   acc     = acc + ki*err                    (limited to +-Vbus)
//   e_hat   = kp*err + acc                    (limited to +-Vbus)
//   i_hat   = i_hat + b*(v_xy - e_hat) - a*i_hat
// with a = dt*R/L and b = dt/L for the sample period dt. The PI loop drives
// the current error to zero, and it does so only when e_hat equals the real
// back EMF, so no current derivative is needed (less noise than the G
// function). Line voltages come from the switching functions of the applied
// mode: v_xy = Vbus/2*(SF_x - SF_y), SF = +1 upper on, -1 lower on, 0 off.
// The current model, the PI correction of the current error and the output
// limit follow the original observer, which was studied only in simulation;
// the forward-Euler discretisation, the error sign that makes the loop
// stable (err = model - measured), the anti-windup limit and the fixed-point
// formats are this design's choices. Units: currents Q16.16 mA, voltages
// Q16.16 mV, coefficients Q8.24.
// Timing: one update per in_valid; outputs are registered and out_valid
// pulses one clock after in_valid. clr resets all states to zero.
module bemf_observer
  import bldc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        in_valid,
  input  q16_t        ia,
  input  q16_t        ib,
  input  q16_t        ic,
  input  mode_t       mode,
  input  logic [15:0] vbus_mv,
  input  obs_cfg_t    cfg,
  output q16_t        e_ab,
  output q16_t        e_bc,
  output q16_t        e_ca,
  output q16_t        ih_ab,
  output q16_t        ih_bc,
  output q16_t        ih_ca,
  output logic        out_valid
);

  typedef logic signed [63:0] w_t;
  typedef logic signed [95:0] p_t;

  q16_t ih   [3];
  q16_t acc  [3];
  q16_t eh   [3];
  q16_t ih_n [3];
  q16_t acc_n[3];
  q16_t eh_n [3];
  q16_t iline[3];
  w_t   vline[3];
  gates_t sw;
  logic signed [1:0] sfa, sfb, sfc;
  w_t   vmax;

  // coefficient (Q8.24) times value (Q16.16) -> Q16.16, wide
  function automatic w_t mulq(input q24_t k, input w_t x);
    p_t p;
    p = (p_t'(k) * p_t'(x)) >>> 24;
    return w_t'(p);
  endfunction

  function automatic w_t lim(input w_t x, input w_t m);
    if (x > m)       return m;
    else if (x < -m) return -m;
    else             return x;
  endfunction

  function automatic q16_t sat32(input w_t x);
    if (x > w_t'(32'sh7FFF_FFFF))       return 32'sh7FFF_FFFF;
    else if (x < -w_t'(32'sh7FFF_FFFF)) return -32'sh7FFF_FFFF;
    else                                return q16_t'(x);
  endfunction

  always_comb begin
    sw   = mode_gates(mode);
    sfa  = sf(sw.a_up, sw.a_lo);
    sfb  = sf(sw.b_up, sw.b_lo);
    sfc  = sf(sw.c_up, sw.c_lo);
    vmax = w_t'({1'b0, vbus_mv}) <<< 16;
    vline[0] = (w_t'({1'b0, vbus_mv}) * (w_t'(sfa) - w_t'(sfb))) <<< 15;
    vline[1] = (w_t'({1'b0, vbus_mv}) * (w_t'(sfb) - w_t'(sfc))) <<< 15;
    vline[2] = (w_t'({1'b0, vbus_mv}) * (w_t'(sfc) - w_t'(sfa))) <<< 15;
    iline[0] = ia - ib;
    iline[1] = ib - ic;
    iline[2] = ic - ia;
    for (int k = 0; k < 3; k++) begin
      w_t err, ac, e;
      err      = w_t'(ih[k]) - w_t'(iline[k]);
      ac       = lim(w_t'(acc[k]) + mulq(cfg.ki, err), vmax);
      e        = lim(mulq(cfg.kp, err) + ac, vmax);
      acc_n[k] = q16_t'(ac);
      eh_n[k]  = q16_t'(e);
      ih_n[k]  = sat32(w_t'(ih[k]) + mulq(cfg.b, vline[k] - e) - mulq(cfg.a, w_t'(ih[k])));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 3; k++) begin ih[k] <= '0; acc[k] <= '0; eh[k] <= '0; end
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && !clr;
      if (clr) begin
        for (int k = 0; k < 3; k++) begin ih[k] <= '0; acc[k] <= '0; eh[k] <= '0; end
      end else if (in_valid) begin
        for (int k = 0; k < 3; k++) begin
          ih[k]  <= ih_n[k];
          acc[k] <= acc_n[k];
          eh[k]  <= eh_n[k];
        end
      end
    end
  end

  assign e_ab  = eh[0];
  assign e_bc  = eh[1];
  assign e_ca  = eh[2];
  assign ih_ab = ih[0];
  assign ih_bc = ih[1];
  assign ih_ca = ih[2];

endmodule
