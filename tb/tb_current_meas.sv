// tb_current_meas - without the filter, random ADC codes are converted to
// mA and compared with (code - uref) * V_lsb / (gain * R_shunt) computed in
// real arithmetic (164.2 uV per code, gain 20, 0.75 Ohm), Ic = -(Ia + Ib),
// one-clock latency. With the filter, a constant input settles to the same
// value as without it and the latency is three clocks.
module tb_current_meas;
  import bldc_pkg::*;
  logic clk = 0, rst_n = 0, fen = 0, iv = 0, ov;
  logic signed [15:0] ca = '0, cb = '0, uref = 16'sd15230;
  q24_t scale;
  q16_t ia, ib, ic;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  current_meas dut (.clk, .rst_n, .filt_en(fen), .in_valid(iv), .code_a(ca), .code_b(cb),
                    .uref_code(uref), .scale, .ia, .ib, .ic, .out_valid(ov));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real MA_PER_CODE = 164.2e-6 / (20.0 * 0.75) * 1000.0;

  function automatic real ma(input q16_t v); return real'(v) / 65536.0; endfunction

  int lat;
  real ea, eb, tol;
  initial begin
    scale = q24_t'($rtoi(MA_PER_CODE * 16777216.0 + 0.5));
    repeat (3) @(negedge clk); rst_n = 1;
    tol = 0.01;   // mA
    for (int k = 0; k < 50; k++) begin
      ca = 16'($urandom_range(0, 30460)); cb = 16'($urandom_range(0, 30460));
      @(negedge clk); iv = 1; @(negedge clk); iv = 0;
      chk(ov, "latency 1 without filter");
      ea = real'(int'(ca) - int'(uref)) * MA_PER_CODE;
      eb = real'(int'(cb) - int'(uref)) * MA_PER_CODE;
      chk(ma(ia) - ea < tol && ea - ma(ia) < tol, $sformatf("ia %f expected %f", ma(ia), ea));
      chk(ma(ib) - eb < tol && eb - ma(ib) < tol, $sformatf("ib %f expected %f", ma(ib), eb));
      chk(ma(ic) + ea + eb < 2.0 * tol && -(ma(ic) + ea + eb) < 2.0 * tol, "ic = -(ia+ib)");
    end
    // filtered path
    fen = 1; ca = 16'sd25000; cb = 16'sd9000;
    @(negedge clk); iv = 1; @(negedge clk); iv = 0; lat = 1;
    while (!ov && lat < 10) begin @(negedge clk); lat++; end
    chk(lat == 3, $sformatf("latency with filter %0d", lat));
    for (int k = 0; k < 3000; k++) begin @(negedge clk); iv = 1; @(negedge clk); iv = 0; end
    repeat (4) @(negedge clk);
    ea = real'(25000 - int'(uref)) * MA_PER_CODE;
    eb = real'(9000 - int'(uref)) * MA_PER_CODE;
    chk(ma(ia) - ea < 0.05 && ea - ma(ia) < 0.05, $sformatf("filtered ia %f expected %f", ma(ia), ea));
    chk(ma(ib) - eb < 0.05 && eb - ma(ib) < 0.05, $sformatf("filtered ib %f expected %f", ma(ib), eb));
    // a step after settling is smoothed: first output moves by less than 1 % of the step
    ca = 16'sd5000;
    @(negedge clk); iv = 1; @(negedge clk); iv = 0; repeat (3) @(negedge clk);
    chk(ma(ia) > ea - 0.01 * (ea - real'(5000 - int'(uref)) * MA_PER_CODE), "filter smooths a step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
