// gate_ctrl - the PWM/commutation loop that drives the inverter bridge.
//
// Every clock it selects the inverter mode from one of three sources:
//   forced_mode 1..6   the mode given by the host (0 = not forced);
//   sensorless = 1     an internal mode counter that is loaded with the Hall
//                      mode when sensorless operation starts and steps one
//                      mode per commutation trigger (forward for direction 0,
//                      backward for direction 1);
//   otherwise          the Hall commutation table (comm_lut).
// The mode's upper transistor is driven by the PWM signal and its lower
// transistor by a static level, as in the original drive. In the safe state
// (safe = 1) all requests are low. The requests then pass the dead-time
// stage, so gates lag the requests by one clock (off) or dt_ticks+1 clocks
// (on). mode_out is the mode actually applied, used by the sensorless G
// function. The source selection rules and the counter behaviour are choices
// of this design; high-side PWM, low-side static drive, the safe state and
// the dead time follow the original loop.
module gate_ctrl
  import bldc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        safe,
  input  logic [2:0]  hall,
  input  logic        direction,
  input  logic        sensorless,
  input  mode_t       forced_mode,
  input  logic        comm_trig,
  input  logic        pwm,
  input  logic [15:0] dt_ticks,
  output mode_t       mode_out,
  output gates_t      gates
);

  mode_t  hall_mode, sl_mode, mode;
  gates_t hall_gates, req_mode, req;
  logic   sl_q;

  comm_lut u_lut (.hall, .direction, .mode(hall_mode), .gates(hall_gates));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sl_mode <= '0;
      sl_q    <= 1'b0;
    end else begin
      sl_q <= sensorless;
      if (sensorless && !sl_q)                      sl_mode <= hall_mode;
      else if (sensorless && comm_trig && sl_mode != '0) sl_mode <= mode_step(sl_mode, direction);
    end
  end

  always_comb begin
    if (safe)                                      mode = '0;
    else if (forced_mode >= 3'd1 && forced_mode <= 3'd6) mode = forced_mode;
    else if (sensorless && sl_q)                   mode = sl_mode;
    else                                           mode = hall_mode;
    req_mode = mode_gates(mode);
    req      = req_mode;
    req.a_up = req_mode.a_up & pwm;
    req.b_up = req_mode.b_up & pwm;
    req.c_up = req_mode.c_up & pwm;
  end

  assign mode_out = mode;

  dead_time #(.N(6)) u_dt (
    .clk, .rst_n, .dt_ticks,
    .req (req),
    .gate(gates)
  );

endmodule
