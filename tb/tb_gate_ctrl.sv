// tb_gate_ctrl - the PWM/commutation loop: safe state switches everything
// off; in Hall mode the upper switch of the table's pair follows the PWM
// and the lower one is static; a forced mode overrides the Hall table;
// in sensorless mode the mode starts at the Hall mode and advances one
// step per commutation trigger, forward or backward with the direction;
// dead time delays every turn-on.
module tb_gate_ctrl;
  import bldc_pkg::*;
  logic clk = 0, rst_n = 0, safe = 1, dir = 0, sl = 0, trig = 0, pwm = 0;
  logic [2:0] hall = 3'd3;
  mode_t forced = '0, mode;
  gates_t g;
  logic [15:0] dt = 16'd4;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  gate_ctrl dut (.clk, .rst_n, .safe, .hall, .direction(dir), .sensorless(sl),
                 .forced_mode(forced), .comm_trig(trig), .pwm, .dt_ticks(dt),
                 .mode_out(mode), .gates(g));

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

  // independent table: {a_up,b_up,c_up,a_lo,b_lo,c_lo} per mode
  logic [5:0] tbl [7] = '{6'b000000, 6'b001010, 6'b100010, 6'b100001,
                          6'b010001, 6'b010100, 6'b001100};

  task automatic settle(); repeat (int'(dt) + 3) @(negedge clk); endtask

  task automatic check_mode(input int m, input string what);
    pwm = 1; settle();
    chk(int'(mode) == m, $sformatf("%s: mode %0d expected %0d", what, mode, m));
    chk(g == tbl[m], $sformatf("%s: gates %b with PWM high", what, g));
    pwm = 0; settle();
    chk(g == (tbl[m] & 6'b000111), $sformatf("%s: only lower switch with PWM low, %b", what, g));
  endtask

  task automatic pulse_trig(); @(negedge clk); trig = 1; @(negedge clk); trig = 0; endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    pwm = 1; settle();
    chk(g == GATES_OFF && mode == 0, "safe state: all off");
    safe = 0;
    check_mode(1, "hall 3");
    hall = 3'd1; check_mode(6, "hall 1");
    dir = 1; check_mode(3, "hall 1 reverse");
    dir = 0;
    forced = 3'd4; check_mode(4, "forced IV");
    forced = 3'd0;
    // sensorless: starts from hall mode VI, steps forward
    hall = 3'd1; sl = 1; @(negedge clk); @(negedge clk);
    chk(mode == 3'd6, "sensorless starts at the Hall mode");
    hall = 3'd2;   // Hall input no longer used
    pulse_trig(); @(negedge clk); chk(mode == 3'd1, "trigger: VI -> I");
    pulse_trig(); @(negedge clk); chk(mode == 3'd2, "trigger: I -> II");
    check_mode(2, "sensorless II");
    dir = 1;
    pulse_trig(); @(negedge clk); chk(mode == 3'd1, "reverse trigger: II -> I");
    pulse_trig(); @(negedge clk); chk(mode == 3'd6, "reverse trigger: I -> VI");
    sl = 0; dir = 0; @(negedge clk);
    chk(mode == 3'd2, "back to Hall mode");
    safe = 1; pwm = 1; @(negedge clk); @(negedge clk);
    chk(g == GATES_OFF, "safe state switches off within two clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
