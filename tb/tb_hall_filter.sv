// tb_hall_filter - checks the Hall sampler/filter: glitches shorter than the
// filter length are ignored, a stable new level is accepted after exactly
// filt_cycles samples, the three lines are independent, and the sample
// strobe comes every SAMPLE_TICKS clocks.
module tb_hall_filter;
  localparam int ST = 5;
  logic clk = 0, rst_n = 0;
  logic [2:0] hall_in = '0, hall_out;
  logic [15:0] filt = 16'd4;
  logic stb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hall_filter #(.SAMPLE_TICKS(ST)) dut (.clk, .rst_n, .hall_in, .filt_cycles(filt),
                                       .hall_out, .sample_stb(stb));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wait_samples(input int n);
    repeat (n) @(posedge clk iff stb);
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t0, t1, nstb;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // strobe period
    @(posedge clk iff stb); t0 = $time;
    @(posedge clk iff stb); t1 = $time;
    chk((t1 - t0) == ST * 10, $sformatf("strobe period %0d", t1 - t0));
    // glitch of 2 samples on A: ignored
    hall_in = 3'b001; wait_samples(2); hall_in = 3'b000; wait_samples(8);
    chk(hall_out == 3'b000, "short glitch ignored");
    // stable B: accepted after 4 samples, not before
    @(negedge clk); hall_in = 3'b010;
    nstb = 0;
    while (hall_out[1] == 1'b0 && nstb < 20) begin
      @(posedge clk); if (stb) nstb++;
    end
    // the 2-flop synchroniser may cost one extra sample
    chk(nstb >= 4 && nstb <= 5, $sformatf("B accepted after %0d samples", nstb));
    chk(hall_out == 3'b010, "only B changed");
    // all lines change together
    hall_in = 3'b101; wait_samples(7);
    chk(hall_out == 3'b101, "A and C accepted, B released");
    // longer filter
    filt = 16'd12; hall_in = 3'b100; wait_samples(9);
    chk(hall_out == 3'b101, "A not yet released with 12-sample filter");
    wait_samples(5);
    chk(hall_out == 3'b100, "A released after 12 samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
