// bldc_fpga_top - FPGA part of a Hall-sensored six-step BLDC drive with
// an experimental sensorless commutation detector.
//
// The design consists of parallel loops that exchange only latest values
// ("tag" registers), mirroring the loop structure of the original controller:
//   Hall loop      hall_filter samples and debounces the three Hall lines
//                  every 7 us; pulse_width_meas measures each line's high
//                  time in us.
//   Speed loop     rpm_calc turns the Hall A high time into rpm (12 pulses
//                  per revolution) and stores it in the speed register.
//   PID loop       every pid_period_us microseconds pid_ctrl compares the
//                  speed with the set-point and writes the duty register.
//                  In the safe state the PID is held in reset, so it starts
//                  bumplessly when the state changes to ST_PID.
//   PWM loop       pwm_center makes the 25 kHz centre-aligned PWM from the
//                  duty register; gate_ctrl applies the six-step table (or
//                  a forced / sensorless mode), the safe state and the dead
//                  time, and drives the six gate outputs.
//   Current loop   the ADC samples of phases A and B (requested with
//                  adc_trigger, in the middle of the PWM pulse) go through
//                  current_meas (optional Butterworth filter, scaling, Ic).
//   G loop         g_func computes the sensorless G function from the
//                  currents and the applied mode and raises commutation
//                  triggers; gate_ctrl uses them when sensorless = 1.
//   Observer loop  bemf_observer estimates the three line back EMFs from the
//                  same currents and mode (indicators bemf_ab/bc/ca); it is
//                  held cleared in the safe state.
//   Host stream    dma_interleave writes {Ia, Ib, Ic, torque, G, trigger}
//                  per current sample into one FIFO read by the host.
// Host controls are plain input ports (state, set-point, configuration) and
// indicators are outputs. All logic runs on one 40 MHz clock with an
// asynchronous active-low reset. The loop partitioning follows the original
// controller; the fixed-point formats and interfaces are this design's.
module bldc_fpga_top
  import bldc_pkg::*;
#(
  parameter int unsigned HALL_SAMPLE_TICKS = 280,    // 7 us at 40 MHz
  parameter int unsigned FIFO_DEPTH        = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  // Hall sensors
  input  logic [2:0]  hall_in,
  // inverter gates
  output gates_t      gates,
  // ADC (phase A and B current channels, torque channel)
  output logic        adc_trigger,
  input  logic        adc_valid,
  input  logic signed [15:0] adc_ia,
  input  logic signed [15:0] adc_ib,
  input  logic signed [15:0] adc_torque,
  // host controls
  input  fpga_state_e state,
  input  logic        direction,
  input  logic        sensorless,
  input  mode_t       forced_mode,
  input  q16_t        setpoint_rpm,
  input  pid_cfg_t    pid_cfg,
  input  logic [15:0] pid_period_us,
  input  logic [15:0] pwm_half_period,
  input  logic [15:0] pwm_trig_lead,
  input  logic [15:0] dead_time_ticks,
  input  logic [15:0] hall_filt_cycles,
  input  logic        filt_en,
  input  logic signed [15:0] uref_code,
  input  q24_t        i_scale,
  input  g_cfg_t      g_cfg,
  input  obs_cfg_t    obs_cfg,
  // host stream
  input  logic        fifo_rd_en,
  output logic [31:0] fifo_rd_data,
  output logic        fifo_empty,
  input  logic        clr_overflow,
  output logic        fifo_overflow,
  // indicators
  output logic [2:0]  hall_filt,
  output logic [15:0] hall_a_us,
  output logic [15:0] hall_b_us,
  output logic [15:0] hall_c_us,
  output q16_t        motor_rpm,
  output q16_t        pwm_duty,
  output mode_t       inverter_mode,
  output q16_t        i_a,
  output q16_t        i_b,
  output q16_t        i_c,
  output q16_t        g_value,
  output logic        comm_trigger,
  output q16_t        bemf_ab,
  output q16_t        bemf_bc,
  output q16_t        bemf_ca
);

  // ---------------- Hall loop ----------------
  logic        hall_stb;
  logic        va, vb_unused, vc_unused;

  hall_filter #(.SAMPLE_TICKS(HALL_SAMPLE_TICKS)) u_hall (
    .clk, .rst_n, .hall_in, .filt_cycles(hall_filt_cycles),
    .hall_out(hall_filt), .sample_stb(hall_stb));

  pulse_width_meas #(.TICKS_PER_US(TICKS_PER_US)) u_pw_a (
    .clk, .rst_n, .sig(hall_filt[0]), .width_us(hall_a_us), .valid(va));
  pulse_width_meas #(.TICKS_PER_US(TICKS_PER_US)) u_pw_b (
    .clk, .rst_n, .sig(hall_filt[1]), .width_us(hall_b_us), .valid(vb_unused));
  pulse_width_meas #(.TICKS_PER_US(TICKS_PER_US)) u_pw_c (
    .clk, .rst_n, .sig(hall_filt[2]), .width_us(hall_c_us), .valid(vc_unused));

  // ---------------- Speed loop ----------------
  logic rpm_done;

  rpm_calc u_rpm (
    .clk, .rst_n, .start(va), .width_us(hall_a_us), .rpm(motor_rpm), .done(rpm_done));

  // ---------------- PID loop ----------------
  logic        safe, us_tick, pid_tick, pid_done;
  logic [5:0]  us_pre;
  logic [15:0] pid_cnt;
  q16_t        pid_u;

  assign safe = (state != ST_PID);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      us_pre <= '0; pid_cnt <= '0; pid_tick <= 1'b0;
    end else begin
      pid_tick <= 1'b0;
      if (us_tick) begin
        us_pre <= '0;
        if (pid_cnt + 1'b1 >= pid_period_us) begin
          pid_cnt  <= '0;
          pid_tick <= 1'b1;
        end else pid_cnt <= pid_cnt + 1'b1;
      end else us_pre <= us_pre + 1'b1;
    end
  end
  assign us_tick = (us_pre == 6'(TICKS_PER_US - 1));

  pid_ctrl u_pid (
    .clk, .rst_n, .clr(safe), .tick(pid_tick), .sp(setpoint_rpm), .pv(motor_rpm),
    .cfg(pid_cfg), .u(pid_u), .done(pid_done));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        pwm_duty <= '0;
    else if (safe)     pwm_duty <= '0;
    else if (pid_done) pwm_duty <= pid_u;
  end

  // ---------------- PWM loop ----------------
  logic pwm, pwm_dir;

  pwm_center u_pwm (
    .clk, .rst_n, .reset(safe), .duty(pwm_duty), .half_period(pwm_half_period),
    .trig_lead(pwm_trig_lead), .pwm, .trigger(adc_trigger), .cnt_up(pwm_dir));

  gate_ctrl u_gate (
    .clk, .rst_n, .safe, .hall(hall_filt), .direction, .sensorless, .forced_mode,
    .comm_trig(comm_trigger), .pwm, .dt_ticks(dead_time_ticks),
    .mode_out(inverter_mode), .gates);

  // ---------------- Current loop ----------------
  logic i_valid;

  current_meas u_cur (
    .clk, .rst_n, .filt_en, .in_valid(adc_valid), .code_a(adc_ia), .code_b(adc_ib),
    .uref_code, .scale(i_scale), .ia(i_a), .ib(i_b), .ic(i_c), .out_valid(i_valid));

  // ---------------- G loop ----------------
  logic g_valid, g_busy, trig_seen;

  g_func u_g (
    .clk, .rst_n, .in_valid(i_valid), .ia(i_a), .ib(i_b), .ic(i_c),
    .mode(inverter_mode), .cfg(g_cfg), .g(g_value), .g_valid, .trigger(comm_trigger),
    .busy(g_busy));

  // ---------------- BEMF observer ----------------
  q16_t ih_ab_unused, ih_bc_unused, ih_ca_unused;
  logic obs_valid;

  bemf_observer u_obs (
    .clk, .rst_n, .clr(safe), .in_valid(i_valid), .ia(i_a), .ib(i_b), .ic(i_c),
    .mode(inverter_mode), .vbus_mv(g_cfg.vbus_mv), .cfg(obs_cfg),
    .e_ab(bemf_ab), .e_bc(bemf_bc), .e_ca(bemf_ca),
    .ih_ab(ih_ab_unused), .ih_bc(ih_bc_unused), .ih_ca(ih_ca_unused),
    .out_valid(obs_valid));

  // trigger flag reported with the next frame
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            trig_seen <= 1'b0;
    else if (comm_trigger) trig_seen <= 1'b1;
    else if (i_valid)      trig_seen <= 1'b0;
  end

  // ---------------- Host stream ----------------
  logic [$clog2(FIFO_DEPTH):0] fifo_level;

  dma_interleave #(.DEPTH(FIFO_DEPTH)) u_dma (
    .clk, .rst_n, .frame_valid(i_valid), .ia(i_a), .ib(i_b), .ic(i_c),
    .torque(adc_torque), .g(g_value), .comm_trig(trig_seen), .clr_ovf(clr_overflow),
    .rd_en(fifo_rd_en), .rd_data(fifo_rd_data), .empty(fifo_empty), .level(fifo_level),
    .overflow(fifo_overflow));

endmodule
