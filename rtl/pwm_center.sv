// pwm_center - center-aligned PWM generator with a mid-pulse trigger.
//
// A triangle counter runs H-1,..,1,0 (counting down) then 0,1,..,H-1
// (counting up), each value twice per period, so one period is 2*H clocks. With the
// default H = 800 and a 40 MHz clock that is 1600 ticks, 25 kHz. The output
// is high while the counter is below the compare value C = duty*H, so the
// high time is exactly 2*C clocks and is centred on the counter minimum.
// trigger pulses while counting down when the counter equals trig_lead, i.e.
// trig_lead+1 clocks before the centre of the high time; with trig_lead = 0 a
// current sample starts in the middle of the pulse. cnt_up shows the counting
// direction. duty (Q16.16, 0..1, clipped) and half_period are taken at the
// counter maximum, in the middle of the low time, so no pulse is cut. reset holds the phase at the counter maximum and the output low.
// The port set follows the PWM generator of the original controller (reset,
// duty cycle, trigger lead, frequency; pwm, trigger, direction); expressing
// the frequency as a half period in ticks is this design's choice.
module pwm_center
  import bldc_pkg::*;
#(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             reset,
  input  q16_t             duty,
  input  logic [CNT_W-1:0] half_period,
  input  logic [CNT_W-1:0] trig_lead,
  output logic             pwm,
  output logic             trigger,
  output logic             cnt_up
);

  logic [CNT_W-1:0] h, cmp, cmp_n;
  logic [CNT_W:0]   p;            // phase in the period, 0 .. 2h-1
  logic [CNT_W-1:0] cnt;          // triangle value
  logic [CNT_W+16:0] prod;

  always_comb begin
    prod = (CNT_W+17)'(duty[16:0]) * (CNT_W+17)'(half_period);
    if (duty <= 0)            cmp_n = '0;
    else if (duty >= Q16_ONE) cmp_n = half_period;
    else                      cmp_n = prod[CNT_W+15:16];
  end

  // p = 0 is the counter maximum (middle of the low time): new duty and
  // period are taken there, so a pulse is never cut.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p <= '0; h <= '0; cmp <= '0;
    end else if (reset || p + 1'b1 >= {h, 1'b0}) begin
      p   <= '0;
      h   <= half_period;
      cmp <= cmp_n;
    end else begin
      p <= p + 1'b1;
    end
  end

  assign cnt_up  = (p >= {1'b0, h});
  assign cnt     = cnt_up ? CNT_W'(p - {1'b0, h}) : CNT_W'({1'b0, h} - 1'b1 - p);
  assign pwm     = !reset && (cnt < cmp);
  assign trigger = !reset && !cnt_up && (cnt == trig_lead);

endmodule
