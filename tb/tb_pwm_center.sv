// tb_pwm_center - measures the generated PWM: period 2*H clocks (1600 at
// the default 25 kHz setting), high time 2*duty*H, pulse centred on the
// counter minimum, trigger trig_lead+1 clocks before the pulse centre,
// reset forces the output low, duty limits 0 and 1.
module tb_pwm_center;
  import bldc_pkg::*;
  logic clk = 0, rst_n = 0, reset = 1, pwm, trigger, cnt_up;
  q16_t duty;
  logic [15:0] h = 16'd800, lead = 16'd0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pwm_center dut (.clk, .rst_n, .reset, .duty, .half_period(h), .trig_lead(lead),
                  .pwm, .trigger, .cnt_up);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // measure one full period starting at a rising edge
  task automatic measure(input real d, input int hh, input int ld);
    int per, high, t_trig, t, cmp;
    logic prev;
    @(negedge clk); duty = q16_t'($rtoi(d * 65536.0)); h = 16'(hh); lead = 16'(ld);
    // let two periods pass so the new values are in effect
    repeat (3400 + 4 * hh) @(negedge clk);
    cmp = int'((longint'(duty) * hh) >>> 16);
    // find rising edge
    prev = pwm;
    t = 0;
    while (!(pwm && !prev) && t < 8 * hh) begin prev = pwm; @(negedge clk); t++; end
    per = 0; high = 0; t_trig = -1;
    prev = 1'b1;
    do begin
      if (pwm) high++;
      if (trigger) t_trig = per;
      per++;
      prev = pwm;
      @(negedge clk);
    end while (!(pwm && !prev) && per < 8 * hh);
    chk(per == 2 * hh, $sformatf("period %0d expected %0d", per, 2 * hh));
    chk(high == 2 * cmp, $sformatf("duty %f: high %0d expected %0d", d, high, 2 * cmp));
    // pulse centre is cmp clocks after the rising edge; trigger lead+1 before it
    chk(t_trig == cmp - ld - 1, $sformatf("trigger at %0d expected %0d", t_trig, cmp - ld - 1));
  endtask

  int nhigh;
  initial begin
    duty = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (100) @(negedge clk);
    chk(!pwm, "reset holds output low");
    reset = 0;
    measure(0.5, 800, 0);
    measure(0.7, 800, 0);
    measure(0.15, 800, 10);
    measure(0.333, 50, 3);
    // duty 0 and above 1
    @(negedge clk); duty = '0; repeat (3200) @(negedge clk);
    nhigh = 0; repeat (1600) begin @(negedge clk); if (pwm) nhigh++; end
    chk(nhigh == 0, "duty 0 gives no pulse");
    duty = 32'sh0002_0000; h = 16'd800; repeat (3200) @(negedge clk);
    nhigh = 0; repeat (1600) begin @(negedge clk); if (pwm) nhigh++; end
    chk(nhigh == 1600, "duty above 1 gives full on");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
