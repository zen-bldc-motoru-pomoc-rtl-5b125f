// tb_pulse_width_meas - high pulses of known length must be reported in
// microseconds (40 clocks per us), once per falling edge, saturating at
// 65535.
module tb_pulse_width_meas;
  logic clk = 0, rst_n = 0, sig = 0, valid;
  logic [15:0] w;
  int checks = 0, failures = 0, nvalid = 0;
  always #5 clk = ~clk;

  pulse_width_meas dut (.clk, .rst_n, .sig, .width_us(w), .valid);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (valid) nvalid++;

  initial begin
    #40_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(input int us, input int extra);
    @(negedge clk); sig = 1;
    repeat (us * 40 + extra) @(negedge clk);
    sig = 0;
    repeat (5) @(negedge clk);
  endtask

  int n0;
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 12; k++) begin
      int us;
      us = (k < 4) ? (k * 37 + 1) : int'($urandom_range(1, 3000));
      n0 = nvalid;
      pulse(us, int'($urandom_range(0, 39)));
      chk(w == 16'(us), $sformatf("width %0d us read %0d", us, w));
      chk(nvalid == n0 + 1, "one valid per pulse");
    end
    pulse(70000, 0);
    chk(w == 16'hFFFF, "saturates");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
