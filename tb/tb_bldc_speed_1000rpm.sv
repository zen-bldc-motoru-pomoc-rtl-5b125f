// tb_bldc_speed_1000rpm - the reference speed-control operating point: the
// complete controller, at its default parameters, regulates the motor model
// to a 1000 rpm set-point with the reference PID settings (Kc 0, integral
// gain 1e-6 and derivative gain 0.002 per update, output range 0.1 to 0.99),
// Hall commutation, 25 kHz PWM and 50-tick dead time.
// The PID runs every 500 us (the update period is this testbench's choice).
// Checks: the motor starts from standstill, the mean measured speed over the
// last 100 ms is within 3 % of 1000 rpm and agrees with the model's speed
// within 3 %, the duty register stays inside the output range after every
// PID update,
// and no leg ever has both transistors on. The host FIFO is not read, so the
// overflow flag must set.
module tb_bldc_speed_1000rpm;
  import bldc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;     // 40 MHz

  fpga_state_e state = ST_SAFE;
  q16_t setpoint;
  pid_cfg_t pcfg;
  g_cfg_t gcfg;
  obs_cfg_t ocfg;
  q24_t i_scale;
  logic signed [15:0] uref = 16'sd15230;

  logic [2:0] hall, hall_filt;
  gates_t gates;
  logic adc_trigger, adc_valid, fifo_empty, fifo_ovf, comm_trigger;
  logic signed [15:0] adc_ia, adc_ib, adc_tq;
  logic [31:0] rd_data;
  logic [15:0] ha_us, hb_us, hc_us;
  q16_t rpm, duty, i_a, i_b, i_c, gval, e_ab, e_bc, e_ca;
  mode_t mode;

  logic craft_en = 0;
  real craft_num = 0.0, ma_per_code;
  real w_rpm, theta;

  int checks = 0, failures = 0;

  bldc_fpga_top dut (
    .clk, .rst_n, .hall_in(hall), .gates, .adc_trigger, .adc_valid, .adc_ia, .adc_ib,
    .adc_torque(adc_tq), .state, .direction(1'b0), .sensorless(1'b0), .forced_mode(3'd0),
    .setpoint_rpm(setpoint), .pid_cfg(pcfg), .pid_period_us(16'd500),
    .pwm_half_period(16'd800), .pwm_trig_lead(16'd0), .dead_time_ticks(16'd50),
    .hall_filt_cycles(16'd10), .filt_en(1'b1), .uref_code(uref), .i_scale, .g_cfg(gcfg),
    .obs_cfg(ocfg), .fifo_rd_en(1'b0), .fifo_rd_data(rd_data), .fifo_empty,
    .clr_overflow(1'b0), .fifo_overflow(fifo_ovf), .hall_filt, .hall_a_us(ha_us),
    .hall_b_us(hb_us), .hall_c_us(hc_us), .motor_rpm(rpm), .pwm_duty(duty),
    .inverter_mode(mode), .i_a, .i_b, .i_c, .g_value(gval), .comm_trigger,
    .bemf_ab(e_ab), .bemf_bc(e_bc), .bemf_ca(e_ca));

  bldc_motor_model u_motor (
    .clk, .gates, .duty, .adc_trigger, .craft_en, .craft_num, .ma_per_code, .uref,
    .r_ohm(25.5), .vbus_mv(18000.0), .hall, .adc_valid, .adc_ia, .adc_ib,
    .adc_torque(adc_tq), .w_rpm, .theta);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  function automatic q24_t g24(input real v); return q24_t'($rtoi(v * 16777216.0)); endfunction
  function automatic q16_t g16(input real v); return q16_t'($rtoi(v * 65536.0)); endfunction
  function automatic real  r16(input q16_t v); return real'(v) / 65536.0; endfunction

  initial begin
    #800_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitors
  int n_shoot = 0, n_range = 0;
  logic done_q = 0;
  always @(posedge clk) begin
    done_q <= dut.u_pid.done;
    if ((gates.a_up && gates.a_lo) || (gates.b_up && gates.b_lo) || (gates.c_up && gates.c_lo))
      n_shoot++;
    if (state == ST_PID && done_q && (duty < g16(0.0999) || duty > g16(0.9901)))
      n_range++;
  end

  real sum_meas, sum_model;
  int n_avg;
  initial begin
    setpoint = g16(1000.0);
    pcfg.kp = g24(0.0); pcfg.ki = g24(1.0e-6); pcfg.kd = g24(0.002); pcfg.a = g24(0.0);
    pcfg.beta = g24(1.0); pcfg.gamma = g24(1.0); pcfg.out_high = g16(0.99); pcfg.out_low = g16(0.1);
    gcfg.i_upscale = 8'd10; gcfg.vbus_mv = 16'd18000; gcfg.r_ohm = g16(25.5);
    gcfg.l_per_dt = g16(0.0083 * 25000.0); gcfg.threshold = g16(20.0); gcfg.hysteresis = g16(2.0);
    ocfg.a = g24(40e-6 * 25.5 / 8.32e-3); ocfg.b = g24(40e-6 / 8.32e-3);
    ocfg.kp = g24(4000.0 * 8.32e-3 - 25.5); ocfg.ki = g24(4.0e6 * 8.32e-3 * 40e-6);
    ma_per_code = 164.2e-6 / (20.0 * 0.75) * 1000.0;
    i_scale = g24(ma_per_code);

    repeat (5) @(negedge clk); rst_n = 1;
    repeat (1000) @(negedge clk);
    state = ST_PID;
    // 400 ms of regulation, the last 100 ms averaged (sampled every 100 us)
    repeat (300 * 40_000) @(negedge clk);   // 300 ms
    chk(w_rpm > 500.0, $sformatf("motor started, %f rpm", w_rpm));
    sum_meas = 0.0; sum_model = 0.0; n_avg = 0;
    repeat (1000) begin
      repeat (4000) @(negedge clk);
      sum_meas += r16(rpm); sum_model += w_rpm; n_avg++;
    end
    $display("1000 rpm set-point: measured %f rpm, model %f rpm, duty %f",
             sum_meas / n_avg, sum_model / n_avg, r16(duty));
    chk(sum_meas / n_avg > 970.0 && sum_meas / n_avg < 1030.0, "mean measured speed within 3 % of 1000 rpm");
    chk(sum_model / n_avg > 970.0 && sum_model / n_avg < 1030.0, "mean model speed within 3 % of 1000 rpm");
    chk(n_range == 0, $sformatf("duty outside 0.1..0.99 on %0d updates", n_range));
    chk(n_shoot == 0, $sformatf("shoot-through clocks %0d", n_shoot));
    chk(fifo_ovf, "FIFO overflow flagged while the host does not read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
