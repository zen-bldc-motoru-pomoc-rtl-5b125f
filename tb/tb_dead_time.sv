// tb_dead_time - a request must reach its gate dt_ticks+1 clocks after it
// rises and one clock after it falls; pulses shorter than the dead time are
// swallowed; when a leg hands over from one transistor to the other the
// gap is at least dt_ticks clocks.
module tb_dead_time;
  logic clk = 0, rst_n = 0;
  logic [15:0] dt = 16'd50;
  logic [5:0] req = '0, gate;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dead_time dut (.clk, .rst_n, .dt_ticks(dt), .req, .gate);

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

  int t, gap;
  bit overlap = 0;
  always @(posedge clk) if (gate[0] && gate[3]) overlap = 1;

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 3; k++) begin
      dt = (k == 0) ? 16'd50 : (k == 1) ? 16'd5 : 16'd0;
      @(negedge clk); req[1] = 1; t = 0;
      while (!gate[1] && t < 200) begin @(negedge clk); t++; end
      chk(t == int'(dt) + 1, $sformatf("turn-on delay %0d with dt %0d", t, dt));
      req[1] = 0; @(negedge clk);
      chk(!gate[1], "turn-off after one clock");
    end
    dt = 16'd50;
    // short pulse swallowed
    @(negedge clk); req[2] = 1; repeat (30) @(negedge clk); req[2] = 0;
    repeat (60) @(negedge clk);
    chk(!gate[2], "pulse shorter than dead time suppressed");
    // hand-over in leg A (bit 0 upper, bit 3 lower)
    req[0] = 1; repeat (80) @(negedge clk);
    req[0] = 0; req[3] = 1; gap = 0;
    @(negedge clk);
    while (!gate[3] && gap < 200) begin @(negedge clk); gap++; end
    chk(gap >= 50, $sformatf("hand-over gap %0d", gap));
    chk(!overlap, "upper and lower never on together");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
