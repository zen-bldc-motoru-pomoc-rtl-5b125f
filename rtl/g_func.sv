// g_func - sensorless commutation detector based on the G function.
//
// For a line pair xy the function
//   H_xy = V_xy - R*i_xy - (L/dt)*(i_xy(k) - i_xy(k-1))
// is proportional to the derivative of the line flux linkage with respect to
// rotor angle, scaled by the unknown speed. The ratio of two such functions,
// G, does not depend on speed and peaks when the rotor reaches the next
// commutation angle. The pair used depends on the inverter mode:
//   modes I, IV:  G = H_ca / H_bc     modes II, V:  G = H_bc / H_ab
//   modes III, VI: G = H_ab / H_ca
// Line voltages come from the switching functions of the applied mode,
// V_xy = Vbus/2 * (SF_x - SF_y), SF = +1 upper on, -1 lower on, 0 floating.
// Currents (Q16.16 mA) are first multiplied by cfg.i_upscale. All H terms are
// in mV (R in Ohm times mA), so G is a plain ratio; it is produced in Q16.16,
// clipped to 0 when negative and saturated at the Q16.16 maximum.
// A two-state detector turns G into commutation triggers: while armed, G
// above cfg.threshold gives a one-clock trigger and disarms; G below
// threshold - hysteresis re-arms it.
// Equations, mode table, switching functions and the threshold/hysteresis
// parameters follow the original sensorless loop; the fixed-point units, the
// exact re-arm rule and the use of a precomputed L/dt are this design's
// choices. g_valid pulses 82 clocks (about 2 us) after in_valid, when g is new; a
// sample arriving while a division runs is skipped (busy).
module g_func
  import bldc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  q16_t   ia,
  input  q16_t   ib,
  input  q16_t   ic,
  input  mode_t  mode,
  input  g_cfg_t cfg,
  output q16_t   g,
  output logic   g_valid,
  output logic   trigger,
  output logic   busy
);

  typedef logic signed [63:0] h_t;
  typedef logic signed [95:0] p_t;
  localparam int unsigned DW = 80;

  q16_t   iab_p, ibc_p, ica_p;            // previous line currents
  gates_t sw;
  logic signed [1:0] sfa, sfb, sfc;
  h_t     hab, hbc, hca, num, den, num_abs, den_abs;
  q16_t   iab, ibc, ica;
  logic   div_start, div_busy, div_done, num_neg;
  logic [DW-1:0] quo, rem, dvd, dvs;
  logic   armed;

  // H_xy in Q16.16 mV
  function automatic h_t hfun(input logic signed [1:0] sx, input logic signed [1:0] sy,
                              input q16_t i_now, input q16_t i_prev, input g_cfg_t c);
    p_t v, ri, ld;
    v  = p_t'(signed'({1'b0, c.vbus_mv})) * (p_t'(sx) - p_t'(sy)) <<< 15;   // Vbus/2*(SFx-SFy)
    ri = (p_t'(c.r_ohm) * p_t'(i_now)) >>> 16;
    ld = (p_t'(c.l_per_dt) * (p_t'(i_now) - p_t'(i_prev))) >>> 16;
    return h_t'(v - ri - ld);
  endfunction

  function automatic q16_t up(input q16_t i, input logic [7:0] k);
    return q16_t'(i * signed'({1'b0, k}));
  endfunction

  always_comb begin
    sw  = mode_gates(mode);
    sfa = sf(sw.a_up, sw.a_lo);
    sfb = sf(sw.b_up, sw.b_lo);
    sfc = sf(sw.c_up, sw.c_lo);
    iab = up(ia, cfg.i_upscale) - up(ib, cfg.i_upscale);
    ibc = up(ib, cfg.i_upscale) - up(ic, cfg.i_upscale);
    ica = up(ic, cfg.i_upscale) - up(ia, cfg.i_upscale);
    hab = hfun(sfa, sfb, iab, iab_p, cfg);
    hbc = hfun(sfb, sfc, ibc, ibc_p, cfg);
    hca = hfun(sfc, sfa, ica, ica_p, cfg);
    unique case (mode)
      3'd1, 3'd4: begin num = hca; den = hbc; end
      3'd2, 3'd5: begin num = hbc; den = hab; end
      3'd3, 3'd6: begin num = hab; den = hca; end
      default:    begin num = '0;  den = 64'sd1; end
    endcase
    // |num| << 16 / |den|, sign handled outside the divider
    num_abs = num[63] ? -num : num;
    den_abs = den[63] ? -den : den;
    dvd = DW'(num_abs) << 16;
    dvs = DW'(den_abs);
  end

  assign div_start = in_valid && !div_busy;
  assign busy      = div_busy;

  seq_divider #(.W(DW)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(dvd), .divisor(dvs),
    .quotient(quo), .remainder(rem), .busy(div_busy), .done(div_done));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iab_p <= '0; ibc_p <= '0; ica_p <= '0;
      num_neg <= 1'b0; g <= '0; g_valid <= 1'b0; trigger <= 1'b0; armed <= 1'b1;
    end else begin
      g_valid <= 1'b0;
      trigger <= 1'b0;
      if (div_start) begin
        iab_p   <= iab;
        ibc_p   <= ibc;
        ica_p   <= ica;
        num_neg <= (num[63] != den[63]) && (num != '0);
      end
      if (div_done) begin
        g_valid <= 1'b1;
        if (num_neg)                        g <= '0;
        else if (quo > DW'(32'h7FFF_FFFF))  g <= 32'sh7FFF_FFFF;
        else                                g <= q16_t'(quo[31:0]);
      end
      if (g_valid) begin
        if (armed && g > cfg.threshold) begin
          trigger <= 1'b1;
          armed   <= 1'b0;
        end else if (!armed && g < cfg.threshold - cfg.hysteresis) begin
          armed <= 1'b1;
        end
      end
    end
  end

endmodule
