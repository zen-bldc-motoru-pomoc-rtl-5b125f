// bldc_pkg - types and constants shared by the BLDC motor-control FPGA blocks.
//
// The controller runs from one 40 MHz clock (25 ns tick; the 50-tick dead time
// is 1.25 us). Signals are fixed point: Q16.16 (signed 32 bit, 16 fractional
// bits) for speeds, currents in mA, voltages in mV, duty cycle and the
// G function; Q8.24 for controller gains and weights so that small gains such
// as an integral gain of 1e-6 stay representable. Using fixed point instead of
// single-precision floating point is a choice of this design.
//
// Inverter naming follows the usual six-switch bridge: S1/S4 are the upper and
// lower transistor of phase A, S3/S6 of phase B, S5/S2 of phase C. Modes I..VI
// are the six conduction intervals of six-step commutation:
//   I: S5+S6 (C->B)  II: S1+S6 (A->B)  III: S1+S2 (A->C)
//   IV: S3+S2 (B->C) V: S3+S4 (B->A)   VI: S5+S4 (C->A)
package bldc_pkg;

  localparam int unsigned CLK_HZ = 40_000_000;
  localparam int unsigned TICKS_PER_US = CLK_HZ / 1_000_000;

  typedef logic signed [31:0] q16_t;   // Q16.16
  typedef logic signed [31:0] q24_t;   // Q8.24

  localparam q16_t Q16_ONE = 32'sh0001_0000;
  localparam q24_t Q24_ONE = 32'sh0100_0000;

  // Gate signals of the bridge. Phase order matches the front-panel names
  // PhaseA_Upper .. PhaseC_Lower.
  typedef struct packed {
    logic a_up;
    logic b_up;
    logic c_up;
    logic a_lo;
    logic b_lo;
    logic c_lo;
  } gates_t;

  localparam gates_t GATES_OFF = '0;

  // Inverter mode, 0 = no mode (all switches off), 1..6 = modes I..VI.
  typedef logic [2:0] mode_t;

  // Top-level state of the FPGA personality.
  typedef enum logic [1:0] {
    ST_SAFE    = 2'd0,   // all transistors off, PID held in reset
    ST_PID     = 2'd1    // closed-loop speed control
  } fpga_state_e;

  // PID configuration (Q8.24 gains/weights, Q16.16 output limits).
  typedef struct packed {
    q24_t kp;         // proportional gain
    q24_t ki;         // integral gain (per update)
    q24_t kd;         // derivative gain (per update)
    q24_t a;          // derivative filter coefficient
    q24_t beta;       // set-point weight of the P term
    q24_t gamma;      // set-point weight of the D term
    q16_t out_high;   // upper output limit (duty)
    q16_t out_low;    // lower output limit (duty)
  } pid_cfg_t;

  // Parameters of the sensorless G-function loop.
  typedef struct packed {
    logic [7:0]  i_upscale;   // integer gain applied to the currents
    logic [15:0] vbus_mv;     // motor supply voltage, mV
    q16_t        r_ohm;       // phase-to-phase winding resistance term, Ohm
    q16_t        l_per_dt;    // inductance divided by the sample period, Ohm
    q16_t        threshold;   // G level that signals a commutation
    q16_t        hysteresis;  // G must fall below threshold-hysteresis to re-arm
  } g_cfg_t;

  // Coefficients of the BEMF observer, per sample period dt, for line
  // (phase-to-phase) resistance R and inductance L.
  typedef struct packed {
    q24_t a;          // dt*R/L
    q24_t b;          // dt/L, mA per mV
    q24_t kp;         // proportional gain of the correction, mV per mA
    q24_t ki;         // integral gain of the correction per sample, mV per mA
  } obs_cfg_t;

  // Switching function of one phase: +1 upper on, -1 lower on, 0 floating.
  function automatic logic signed [1:0] sf(input logic up, input logic lo);
    if (up && !lo)      return 2'sd1;
    else if (lo && !up) return -2'sd1;
    else                return 2'sd0;
  endfunction

  // Gate requests of a mode (Fig. of the six conduction intervals).
  function automatic gates_t mode_gates(input mode_t m);
    gates_t g;
    g = GATES_OFF;
    unique case (m)
      3'd1: begin g.c_up = 1'b1; g.b_lo = 1'b1; end
      3'd2: begin g.a_up = 1'b1; g.b_lo = 1'b1; end
      3'd3: begin g.a_up = 1'b1; g.c_lo = 1'b1; end
      3'd4: begin g.b_up = 1'b1; g.c_lo = 1'b1; end
      3'd5: begin g.b_up = 1'b1; g.a_lo = 1'b1; end
      3'd6: begin g.c_up = 1'b1; g.a_lo = 1'b1; end
      default: g = GATES_OFF;
    endcase
    return g;
  endfunction

  // Next mode in the conduction sequence (rev=0: I->II->..->VI->I).
  function automatic mode_t mode_step(input mode_t m, input logic rev);
    if (m == 3'd0 || m == 3'd7) return m;
    if (!rev) return (m == 3'd6) ? 3'd1 : m + 3'd1;
    else      return (m == 3'd1) ? 3'd6 : m - 3'd1;
  endfunction

endpackage
