// current_meas - phase-current measurement loop.
//
// Two phase currents are sampled (ADC codes of the in-line current-sense
// amplifiers for phases A and B); the third follows from Kirchhoff's law for
// a star-connected motor, ic = -(ia + ib). When filt_en is set each sampled
// channel first passes a 4th-order Butterworth low-pass (butterworth_lp4).
// The amplifier's mid-scale reference (uref_code, e.g. 2.5 V) is then
// removed and the difference scaled to milliamperes:
//   i_mA = (code - uref_code) * scale,  scale = V_lsb / (gain * R_shunt)
// with scale in Q8.24 mA per code and the results in Q16.16 mA. For a
// 164.2 uV code, gain 20 and 0.75 Ohm, scale = 0.010947 mA per code.
// Sampling two channels, the optional filter, the offset, the scaling and
// the third-current calculation follow the original current loop; folding
// the separate divisions by gain and shunt into one multiplier is this
// design's choice. Latency: 1 clock from in_valid without the filter, 3 with
// it; out_valid marks new currents.
module current_meas
  import bldc_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                filt_en,
  input  logic                in_valid,
  input  logic signed [W-1:0] code_a,
  input  logic signed [W-1:0] code_b,
  input  logic signed [W-1:0] uref_code,
  input  q24_t                scale,
  output q16_t                ia,
  output q16_t                ib,
  output q16_t                ic,
  output logic                out_valid
);

  logic signed [W-1:0] fa, fb;
  logic                fva, fvb;
  logic signed [W-1:0] sa, sb;
  logic                sv;

  butterworth_lp4 #(.W(W)) u_fa (
    .clk, .rst_n, .clr(!filt_en), .in_valid, .x(code_a), .y(fa), .out_valid(fva));
  butterworth_lp4 #(.W(W)) u_fb (
    .clk, .rst_n, .clr(!filt_en), .in_valid, .x(code_b), .y(fb), .out_valid(fvb));

  always_comb begin
    if (filt_en) begin
      sa = fa; sb = fb; sv = fva & fvb;
    end else begin
      sa = code_a; sb = code_b; sv = in_valid;
    end
  end

  function automatic q16_t to_ma(input logic signed [W-1:0] c,
                                 input logic signed [W-1:0] r, input q24_t k);
    logic signed [W:0]    d;
    logic signed [W+32:0] p;
    d = (W+1)'(c) - (W+1)'(r);
    p = (W+33)'(d) * (W+33)'(k);
    return q16_t'(p >>> 8);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ia <= '0; ib <= '0; ic <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= sv;
      if (sv) begin
        ia <= to_ma(sa, uref_code, scale);
        ib <= to_ma(sb, uref_code, scale);
        ic <= -(to_ma(sa, uref_code, scale) + to_ma(sb, uref_code, scale));
      end
    end
  end

endmodule
