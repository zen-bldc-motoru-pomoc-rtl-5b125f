// tb_butterworth_lp4 - frequency response of the 4th-order low-pass at the
// default 1 kHz / 100 kS/s design: sine inputs at several frequencies are
// filtered and the steady-state output amplitude is compared with the
// ideal bilinear-transformed Butterworth magnitude
//   |H(f)| = 1 / sqrt(1 + (tan(pi f/fs) / tan(pi fc/fs))^8).
// Also checks unity DC gain and the two-clock latency.
module tb_butterworth_lp4;
  logic clk = 0, rst_n = 0, clr = 0, iv = 0, ov;
  logic signed [15:0] x = '0, y;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  butterworth_lp4 dut (.clk, .rst_n, .clr, .in_valid(iv), .x, .y, .out_valid(ov));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real PI = 3.14159265358979323846;

  task automatic sample(input int v);
    @(negedge clk); x = 16'(v); iv = 1;
    @(negedge clk); iv = 0;
  endtask

  task automatic tone(input real f, input real amp);
    real peak, expv, hm;
    int n;
    peak = 0;
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    n = 4000;
    for (int k = 0; k < n; k++) begin
      sample($rtoi(amp * $sin(2.0 * PI * f * real'(k) / 100000.0)));
      @(negedge clk);
      if (k > n / 2 && ($itor(y) > peak)) peak = $itor(y);
      if (k > n / 2 && (-$itor(y) > peak)) peak = -$itor(y);
    end
    hm = 1.0 / $sqrt(1.0 + $pow($tan(PI * f / 100000.0) / $tan(PI * 1000.0 / 100000.0), 8.0));
    expv = amp * hm;
    chk(peak <= expv * 1.02 + 3.0 && peak >= expv * 0.98 - 3.0,
        $sformatf("%f Hz: amplitude %f expected %f", f, peak, expv));
  endtask

  int lat;
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // latency
    @(negedge clk); x = 16'sd1000; iv = 1; @(negedge clk); iv = 0; lat = 1;
    while (!ov && lat < 10) begin @(negedge clk); lat++; end
    chk(lat == 2, $sformatf("latency %0d", lat));
    // DC gain
    for (int k = 0; k < 3000; k++) sample(20000);
    @(negedge clk);
    chk(y >= 19998 && y <= 20002, $sformatf("DC gain: %0d", y));
    tone(100.0, 20000.0);
    tone(500.0, 20000.0);
    tone(1000.0, 20000.0);
    tone(2000.0, 20000.0);
    tone(5000.0, 20000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
