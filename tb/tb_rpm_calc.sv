// tb_rpm_calc - speed from Hall high time: RPM = 60e6 / (12 * T_us),
// in Q16.16, compared with a real-number evaluation; latency 50 clocks.
module tb_rpm_calc;
  import bldc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  logic [15:0] w;
  q16_t rpm;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  rpm_calc dut (.clk, .rst_n, .start, .width_us(w), .rpm, .done);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int t_us);
    int cyc;
    real exp_rpm, got;
    @(negedge clk); w = 16'(t_us); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    exp_rpm = 60.0 / (real'(t_us) * 12.0 / 1.0e6);
    got = real'(rpm) / 65536.0;
    chk(cyc == 50, $sformatf("latency %0d", cyc));
    if (exp_rpm < 32767.0)
      chk(got <= exp_rpm && exp_rpm - got < 1.0 / 65536.0 + 1e-9,
          $sformatf("T=%0d us: %f rpm expected, %f", t_us, exp_rpm, got));
    else chk(rpm == 32'sh7FFF_FFFF, "saturation");
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run(5000);   // 1000 rpm
    run(1667);
    run(65535);
    run(100);    // 50000 rpm: saturates
    run(0);
    for (int k = 0; k < 20; k++) run(int'($urandom_range(153, 65535)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
