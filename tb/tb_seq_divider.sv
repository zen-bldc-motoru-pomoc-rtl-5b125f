// tb_seq_divider - random and corner-case divisions against the '/' and '%'
// operators, latency of W+1 clocks from start to done, divide by zero.
module tb_seq_divider;
  localparam int W = 64;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [W-1:0] a, b, q, r;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  seq_divider #(.W(W)) dut (.clk, .rst_n, .start, .dividend(a), .divisor(b),
                            .quotient(q), .remainder(r), .busy, .done);

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

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] y);
    int cyc;
    @(negedge clk); a = x; b = y; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    chk(cyc == W + 1, $sformatf("latency %0d", cyc));
    if (y == 0) chk(q == '1, "div by zero gives all ones");
    else begin
      chk(q == x / y, $sformatf("%0d / %0d = %0d got %0d", x, y, x / y, q));
      chk(r == x % y, "remainder");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run(64'd100, 64'd7);
    run(64'd5, 64'd9);
    run('1, 64'd1);
    run('1, '1);
    run(64'd1234, 64'd0);
    for (int k = 0; k < 40; k++) begin
      logic [W-1:0] x, y;
      x = {$urandom, $urandom};
      y = (k % 3 == 0) ? W'($urandom) : {$urandom >> (k % 32), $urandom};
      if (y == 0) y = 1;
      run(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
