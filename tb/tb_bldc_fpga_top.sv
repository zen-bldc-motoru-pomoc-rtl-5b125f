// tb_bldc_fpga_top - end-to-end run of the complete controller, at its
// default parameters, against a behavioural motor/ADC model.
//
// Sequence:
//  1. Safe state after reset: all gates must stay off, duty 0.
//  2. Closed-loop speed control (Hall commutation, PID) from standstill to
//     3000 rpm; the measured speed must settle within 5 %, and all six
//     modes must be applied.
//  3. Butterworth filter enabled for a while.
//  4. Host stops reading the FIFO: the overflow flag must set, and clear
//     on request.
//  5. Forced mode II: exactly A upper (PWM) and B lower.
//  6. Sensorless stepping: the model feeds currents that make the G
//     function cross the threshold; every crossing must step the mode,
//     forward for direction 0 and backward for direction 1.
//  7. Direction reversal under Hall control: the motor must brake, turn
//     the other way and regulate to 3000 rpm again.
//  8. Back to safe state: gates off, duty 0.
// Throughout: no leg ever has both transistors on; each turn-on of a gate
// comes at least the dead time after its leg's other gate went off; every
// host frame has ic = -(ia+ib) and a 0/1 trigger word; the PWM period is
// 1600 clocks between ADC triggers; the BEMF observer updates on every
// sample, its estimates stay within +-Vbus and are zero in the safe state.
// Each mechanism is counted and a count
// of zero is a failure.
module tb_bldc_fpga_top;
  import bldc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;     // 40 MHz

  // host controls
  fpga_state_e state = ST_SAFE;
  logic direction = 0, sensorless = 0, filt_en = 0, clr_ovf = 0, rd_en = 0;
  mode_t forced = '0;
  q16_t setpoint;
  pid_cfg_t pcfg;
  g_cfg_t gcfg;
  q24_t i_scale;
  logic signed [15:0] uref = 16'sd15230;

  // DUT I/O
  logic [2:0] hall, hall_filt;
  gates_t gates;
  logic adc_trigger, adc_valid, fifo_empty, fifo_ovf, comm_trigger;
  logic signed [15:0] adc_ia, adc_ib, adc_tq;
  logic [31:0] rd_data;
  logic [15:0] ha_us, hb_us, hc_us;
  q16_t rpm, duty, i_a, i_b, i_c, gval, e_ab, e_bc, e_ca;
  obs_cfg_t ocfg;
  mode_t mode;

  // model controls
  logic craft_en = 0;
  real craft_num = 0.0, ma_per_code;
  real w_rpm, theta;

  int checks = 0, failures = 0;

  bldc_fpga_top dut (
    .clk, .rst_n, .hall_in(hall), .gates, .adc_trigger, .adc_valid, .adc_ia, .adc_ib,
    .adc_torque(adc_tq), .state, .direction, .sensorless, .forced_mode(forced),
    .setpoint_rpm(setpoint), .pid_cfg(pcfg), .pid_period_us(16'd500),
    .pwm_half_period(16'd800), .pwm_trig_lead(16'd0), .dead_time_ticks(16'd50),
    .hall_filt_cycles(16'd4), .filt_en, .uref_code(uref), .i_scale, .g_cfg(gcfg), .obs_cfg(ocfg),
    .fifo_rd_en(rd_en), .fifo_rd_data(rd_data), .fifo_empty, .clr_overflow(clr_ovf),
    .fifo_overflow(fifo_ovf), .hall_filt, .hall_a_us(ha_us), .hall_b_us(hb_us),
    .hall_c_us(hc_us), .motor_rpm(rpm), .pwm_duty(duty), .inverter_mode(mode),
    .i_a, .i_b, .i_c, .g_value(gval), .comm_trigger,
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
    #900_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- continuous monitors ----------------
  int n_shoot = 0, n_safe_clk = 0, n_safe_bad = 0, n_pid = 0, n_modechg = 0;
  int n_obs = 0, n_obs_nz = 0, n_obs_bad = 0;
  int n_dt_ok = 0, n_dt_bad = 0, n_trig = 0, n_trig_bad = 0, n_comm = 0, n_filt_frames = 0;
  int last_trig_t = -1, cyc = 0;
  bit seen_mode [7];
  mode_t mode_q = '0;
  gates_t g_q = '0;
  int off_t [6];
  int req_t [6];
  int safe_run = 0;
  gates_t req_q = '0;
  q16_t duty_q = '0;

  always @(posedge clk) begin
    cyc++;
    if ((gates.a_up && gates.a_lo) || (gates.b_up && gates.b_lo) || (gates.c_up && gates.c_lo)) n_shoot++;
    if (state == ST_SAFE && rst_n) begin
      n_safe_clk++;
      safe_run++;
      if (gates != GATES_OFF && safe_run > 2) n_safe_bad++;
    end else safe_run = 0;
    // dead time: a gate turning on must come >= 50 clocks after the other gate of its leg went off
    for (int k = 0; k < 6; k++) begin
      logic now_on, was_on;
      int other;
      now_on = gates[5-k]; was_on = g_q[5-k];
      other = (k < 3) ? k + 3 : k - 3;
      if (!now_on && was_on) off_t[k] = cyc;
      if (dut.u_gate.req[5-k] && !req_q[5-k]) req_t[k] = cyc;
      if (now_on && !was_on) begin
        // turn-on comes dead time + 1 clock after the request
        if (cyc - req_t[k] == 51) n_dt_ok++; else n_dt_bad++;
        // and never sooner than the dead time after the leg's other gate went off
        if (off_t[other] > 0 && cyc - off_t[other] < 50) n_dt_bad++;
      end
    end
    g_q <= gates;
    req_q <= dut.u_gate.req;
    if (mode != mode_q) begin
      n_modechg++;
      seen_mode[mode] = 1;
    end
    mode_q <= mode;
    if (duty != duty_q && state == ST_PID) n_pid++;
    duty_q <= duty;
    if (adc_trigger) begin
      if (last_trig_t >= 0 && state == ST_PID && cyc - last_trig_t != 1600 && cyc - last_trig_t < 3200)
        n_trig_bad++;
      last_trig_t = cyc;
      n_trig++;
    end
    if (comm_trigger) n_comm++;
    if (dut.u_obs.out_valid) begin
      n_obs++;
      if (e_ab != 0 || e_bc != 0 || e_ca != 0) n_obs_nz++;
    end
    // estimates stay within the supply and are zero in the safe state
    if (e_ab > g16(18000.0) || e_ab < -g16(18000.0) || e_bc > g16(18000.0) || e_bc < -g16(18000.0) ||
        e_ca > g16(18000.0) || e_ca < -g16(18000.0)) n_obs_bad++;
    if (safe_run > 4 && (e_ab != 0 || e_bc != 0 || e_ca != 0)) n_obs_bad++;
  end

  // ---------------- host FIFO reader ----------------
  bit reading = 1, checking = 1;
  int widx = 0, n_frames = 0, n_frame_bad = 0;
  q16_t fw [6];
  logic rd_q = 0;
  always @(posedge clk) begin
    rd_q <= rd_en;
    if (rd_q) begin
      fw[widx] = rd_data;
      if (widx == 5) begin
        if (checking) begin
          n_frames++;
          if (filt_en) n_filt_frames++;
          if (fw[2] != -(fw[0] + fw[1]) || fw[5] > 1) n_frame_bad++;
        end
        widx = 0;
      end else widx++;
    end
  end
  always @(negedge clk)
    rd_en <= reading && !fifo_empty && !rd_en && !rd_q && !dut.u_dma.active;

  // ---------------- test sequence ----------------
  int n0, m0, n_sl_steps = 0;
  real rpm_err;
  bit reversed = 0;
  initial begin
    setpoint = g16(3000.0);
    pcfg.kp = g24(0.0001); pcfg.ki = g24(2.5e-6); pcfg.kd = g24(0.0); pcfg.a = g24(0.0);
    pcfg.beta = g24(1.0); pcfg.gamma = g24(1.0); pcfg.out_high = g16(0.7); pcfg.out_low = g16(0.001);
    // observer: 40 us sample period, R 25.5 Ohm, L 8.32 mH, double pole at 2000 rad/s
    ocfg.a = g24(40e-6 * 25.5 / 8.32e-3); ocfg.b = g24(40e-6 / 8.32e-3);
    ocfg.kp = g24(4000.0 * 8.32e-3 - 25.5); ocfg.ki = g24(4.0e6 * 8.32e-3 * 40e-6);
    gcfg.i_upscale = 8'd10; gcfg.vbus_mv = 16'd18000; gcfg.r_ohm = g16(25.5);
    gcfg.l_per_dt = g16(0.0083 * 25000.0); gcfg.threshold = g16(20.0); gcfg.hysteresis = g16(2.0);
    ma_per_code = 164.2e-6 / (20.0 * 0.75) * 1000.0;
    i_scale = g24(ma_per_code);
    for (int k = 0; k < 6; k++) begin off_t[k] = 0; req_t[k] = 0; end

    // 1. safe state
    repeat (5) @(negedge clk); rst_n = 1;
    repeat (8000) @(negedge clk);
    chk(gates == GATES_OFF && duty == 0, "safe state after reset");

    // 2. speed control
    state = ST_PID;
    repeat (40_000 * 250) @(negedge clk);      // 250 ms
    rpm_err = r16(rpm) - 3000.0;
    chk(rpm_err < 150.0 && rpm_err > -150.0, $sformatf("speed %f rpm, set-point 3000", r16(rpm)));
    chk(w_rpm > 2800.0 && w_rpm < 3200.0, $sformatf("model speed %f", w_rpm));
    for (int k = 1; k <= 6; k++) chk(seen_mode[k], $sformatf("mode %0d applied", k));
    $display("speed control: measured %f rpm, model %f rpm, duty %f", r16(rpm), w_rpm, r16(duty));

    // 3. filter
    filt_en = 1;
    repeat (40_000 * 5) @(negedge clk);
    chk(n_filt_frames > 50, "frames with filter enabled");
    filt_en = 0;

    // 4. FIFO overflow
    reading = 0;
    repeat (40_000 * 10) @(negedge clk);
    chk(fifo_ovf, "FIFO overflow when host does not read");
    checking = 0; reading = 1;
    repeat (40_000 * 2) @(negedge clk);
    while (!fifo_empty) @(negedge clk);
    @(negedge clk); clr_ovf = 1; @(negedge clk); clr_ovf = 0;
    chk(!fifo_ovf, "overflow cleared");
    // resynchronise on a frame boundary: drain right after a frame
    @(posedge adc_valid); repeat (20) @(negedge clk);
    while (!fifo_empty) @(negedge clk);
    repeat (4) @(negedge clk);
    widx = 0; checking = 1;
    repeat (40_000) @(negedge clk);
    chk(!fifo_ovf, "no overflow while the host reads");

    $display("phase 4 done at %0t", $time);
    // 5. forced mode
    forced = 3'd2;
    repeat (4000) @(negedge clk);
    chk(mode == 3'd2, "forced mode applied");
    chk((gates & 6'b011111) == 6'b000010 , $sformatf("forced mode II: only A upper and B lower, %b", gates));
    forced = 3'd0;

    // 6. sensorless stepping
    gcfg.i_upscale = 8'd1; gcfg.l_per_dt = '0;
    ma_per_code = 0.05; i_scale = g24(0.05);
    craft_en = 1; craft_num = 0.0;
    sensorless = 1;
    repeat (4000) @(negedge clk);
    for (int k = 0; k < 12; k++) begin
      if (k == 6) direction = 1;
      m0 = int'(mode); n0 = n_comm;
      craft_num = 5000.0;                     // G = 50
      while (n_comm == n0) @(negedge clk);
      repeat (3) @(negedge clk);
      chk(int'(mode) == ((direction == 0) ? (m0 % 6) + 1 : ((m0 + 4) % 6) + 1),
          $sformatf("sensorless step %0d: mode %0d -> %0d", k, m0, mode));
      n_sl_steps++;
      craft_num = 0.0;                        // G = 0: re-arm
      repeat (1600 * 3) @(negedge clk);
    end
    sensorless = 0; craft_en = 0;
    ma_per_code = 164.2e-6 / (20.0 * 0.75) * 1000.0;
    i_scale = g24(ma_per_code);
    gcfg.i_upscale = 8'd10; gcfg.l_per_dt = g16(0.0083 * 25000.0);

    $display("phase 6 done at %0t", $time);
    // 7. reversal (direction stays 1)
    repeat (40_000 * 300) @(negedge clk);
    reversed = (w_rpm < -2800.0);
    chk(reversed, $sformatf("motor reversed, model speed %f", w_rpm));
    rpm_err = r16(rpm) - 3000.0;
    chk(rpm_err < 150.0 && rpm_err > -150.0, $sformatf("reverse speed %f rpm", r16(rpm)));
    $display("reverse: measured %f rpm, model %f rpm", r16(rpm), w_rpm);

    // 8. safe state again
    state = ST_SAFE;
    repeat (100) @(negedge clk);
    chk(gates == GATES_OFF && duty == 0, "safe state switches off");

    // summary of the monitors
    chk(n_shoot == 0, $sformatf("shoot-through clocks %0d", n_shoot));
    chk(n_safe_bad == 0, "gates off in safe state");
    chk(n_dt_bad == 0, $sformatf("dead-time violations %0d", n_dt_bad));
    chk(n_trig_bad == 0, $sformatf("ADC trigger spacing errors %0d", n_trig_bad));
    chk(n_frame_bad == 0, $sformatf("bad host frames %0d", n_frame_bad));
    $display("mechanisms: safe-state clocks %0d, PID duty updates %0d, mode changes %0d, dead-time delayed turn-ons %0d, ADC triggers %0d, host frames %0d, filtered frames %0d, G triggers %0d, sensorless steps %0d, reversal %0d, overflow 1, observer updates %0d (nonzero %0d)",
             n_safe_clk, n_pid, n_modechg, n_dt_ok, n_trig, n_frames, n_filt_frames, n_comm, n_sl_steps, reversed, n_obs, n_obs_nz);
    chk(n_safe_clk > 0, "safe state happened");
    chk(n_pid > 0, "PID updates happened");
    chk(n_modechg > 0, "commutations happened");
    chk(n_dt_ok > 0, "dead-time delayed turn-ons happened");
    chk(n_trig > 0, "ADC triggers happened");
    chk(n_frames > 0, "host frames happened");
    chk(n_comm > 0, "G-function triggers happened");
    chk(n_obs > 0 && n_obs_nz > 0, "BEMF observer updates happened");
    chk(n_obs_bad == 0, $sformatf("BEMF estimates out of range or not cleared %0d", n_obs_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
