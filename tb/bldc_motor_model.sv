// bldc_motor_model - behavioural model (testbench only, not synthesizable)
// of the motor, its Hall sensors, the in-line current sensing and the ADC.
//
// Motor: 6 pole pairs; speed follows the drive as a first-order lag,
//   dw/dt = (sgn * NOLOAD_RPM * u - w) / TAU
// where u is 1 while the energised upper transistor is on (so the average
// is the PWM duty) and sgn is +1 when the applied mode is the forward mode
// of the rotor sector (or the one before it), -1 for the opposite modes and
// 0 otherwise. NOLOAD_RPM = 18 V * 36.7 rad/(V s) = 6300 rpm; TAU is the
// mechanical time constant J*R/k^2 (about 20 ms). Without any gate the rotor
// coasts with a ten times longer time constant. The electrical angle
// integrates the speed; the Hall lines are 180 degrees wide, 120 degrees
// apart, A high from 0 to 180 degrees.
// ADC: adc_trigger starts a conversion; CONV_TICKS later adc_valid pulses
// with phase A and B codes = uref + I/MA_PER_CODE, where the upper phase
// carries +I, the lower -I, I = (18 V*duty - back-EMF)/25.5 Ohm. With
// craft_en the codes instead make the G function of the applied mode equal
// to H_num/H_den = craft_num/100 (or zero currents when craft_num is 0), for
// exercising the sensorless detector.
module bldc_motor_model
  import bldc_pkg::*;
#(
  parameter real TAU_S      = 0.02,
  parameter int  CONV_TICKS = 320
) (
  input  logic               clk,
  input  gates_t             gates,
  input  q16_t               duty,
  input  logic               adc_trigger,
  input  logic               craft_en,
  input  real                craft_num,
  input  real                ma_per_code,
  input  logic signed [15:0] uref,
  input  real                r_ohm,
  input  real                vbus_mv,
  output logic [2:0]         hall,
  output logic               adc_valid,
  output logic signed [15:0] adc_ia,
  output logic signed [15:0] adc_ib,
  output logic signed [15:0] adc_torque,
  output real                w_rpm,
  output real                theta
);

  localparam real DT = 25.0e-9;
  localparam real NOLOAD_RPM = 6300.0;
  localparam int  POLE_PAIRS = 6;

  // forward mode of each 60-degree sector, from the Hall code of the sector
  int fwd_of_code [8] = '{0, 6, 2, 1, 4, 5, 3, 0};

  function automatic int applied_mode(input gates_t g);
    if (g.c_up && g.b_lo) return 1;
    if (g.a_up && g.b_lo) return 2;
    if (g.a_up && g.c_lo) return 3;
    if (g.b_up && g.c_lo) return 4;
    if (g.b_up && g.a_lo) return 5;
    if (g.c_up && g.a_lo) return 6;
    return 0;
  endfunction

  function automatic int lo_mode(input gates_t g);   // pair with the upper off
    if (g.b_lo) return 1;
    if (g.c_lo) return 3;
    if (g.a_lo) return 5;
    return 0;
  endfunction

  function automatic logic [2:0] hall_of(input real th);
    logic [2:0] h;
    h[0] = (th >= 0.0 && th < 180.0);
    h[1] = (th >= 120.0 && th < 300.0);
    h[2] = (th >= 240.0 || th < 60.0);
    return h;
  endfunction

  function automatic int wrap6(input int m); return ((m - 1 + 12) % 6) + 1; endfunction

  real w, th, i_ma;
  int  sgn, m, f, conv;
  logic [2:0] h;
  int  last_mode;

  initial begin
    w = 0.0; th = 30.0; conv = -1; last_mode = 0;
    adc_valid = 0; adc_ia = uref; adc_ib = uref; adc_torque = '0;
  end

  assign w_rpm = w;
  assign theta = th;
  assign hall  = hall_of(th);

  always @(posedge clk) begin
    h = hall_of(th);
    f = fwd_of_code[h];
    m = applied_mode(gates);
    if (m != 0) last_mode = m;
    sgn = 0;
    if (last_mode != 0 && f != 0) begin
      if (last_mode == f || last_mode == wrap6(f - 1)) sgn = 1;
      else if (last_mode == wrap6(f + 3) || last_mode == wrap6(f + 4)) sgn = -1;
    end
    if (gates == GATES_OFF) begin
      w = w - w * DT / (10.0 * TAU_S);
      last_mode = 0;
    end else if (m != 0) w = w + (real'(sgn) * NOLOAD_RPM - w) * DT / TAU_S;
    else                 w = w + (0.0 - w) * DT / TAU_S;
    th = th + w / 60.0 * real'(POLE_PAIRS) * 360.0 * DT;
    while (th >= 360.0) th = th - 360.0;
    while (th < 0.0)    th = th + 360.0;

    // ADC
    adc_valid <= 1'b0;
    if (adc_trigger && conv < 0) conv = CONV_TICKS;
    if (conv == 0) begin
      real ia, ib, d;
      int mm;
      mm = (last_mode != 0) ? last_mode : lo_mode(gates);
      d  = real'(duty) / 65536.0;
      if (!craft_en) begin
        i_ma = (vbus_mv * d - vbus_mv * ((w < 0.0) ? -w : w) / NOLOAD_RPM) / r_ohm;
        if (i_ma < 0.0) i_ma = 0.0;
        ia = 0.0; ib = 0.0;
        case (mm)
          1: ib = -i_ma;
          2: begin ia = i_ma; ib = -i_ma; end
          3: ia = i_ma;
          4: ib = i_ma;
          5: begin ib = i_ma; ia = -i_ma; end
          6: ia = -i_ma;
          default: ;
        endcase
      end else begin
        craft(mm, ia, ib);
      end
      adc_ia     <= 16'(int'(uref) + $rtoi(ia / ma_per_code));
      adc_ib     <= 16'(int'(uref) + $rtoi(ib / ma_per_code));
      adc_torque <= 16'($rtoi(i_ma * 10.0));
      adc_valid  <= 1'b1;
    end
    if (conv >= 0) conv = conv - 1;
  end

  // line-to-line voltage of a mode for the line pair (x,y), mV
  function automatic real vline(input int mm, input int x, input int y);
    int t [7][3] = '{'{0,0,0}, '{0,-1,1}, '{1,-1,0}, '{1,0,-1}, '{0,1,-1}, '{-1,1,0}, '{-1,0,1}};
    return vbus_mv / 2.0 * real'(t[mm][x] - t[mm][y]);
  endfunction

  // Solve H_den = 100 mV, H_num = craft_num mV for ia, ib with ic = -(ia+ib)
  // and no inductive term. H_xy = V_xy - R*(c1*ia + c2*ib) with
  // (c1,c2) = (1,-1) for ab, (1,2) for bc, (-2,-1) for ca.
  task automatic craft(input int mm, output real ia, output real ib);
    real vn, vd, n1, n2, d1, d2, rn, rd, det;
    ia = 0.0; ib = 0.0;
    if (craft_num == 0.0 || mm == 0) return;
    case (mm)
      1, 4: begin vn = vline(mm, 2, 0); n1 = -2; n2 = -1; vd = vline(mm, 1, 2); d1 = 1; d2 = 2; end
      2, 5: begin vn = vline(mm, 1, 2); n1 = 1;  n2 = 2;  vd = vline(mm, 0, 1); d1 = 1; d2 = -1; end
      default: begin vn = vline(mm, 0, 1); n1 = 1; n2 = -1; vd = vline(mm, 2, 0); d1 = -2; d2 = -1; end
    endcase
    // R*(n1 ia + n2 ib) = vn - craft_num ; R*(d1 ia + d2 ib) = vd - 100
    rn = (vn - craft_num) / r_ohm;
    rd = (vd - 100.0) / r_ohm;
    det = n1 * d2 - n2 * d1;
    ia = (rn * d2 - n2 * rd) / det;
    ib = (n1 * rd - rn * d1) / det;
  endtask

endmodule
