// tb_comm_lut - exhaustive check of the commutation table: for both
// directions and all eight Hall codes the selected mode and its switch pair
// are compared with the conduction table written out here independently
// (mode I: C upper + B lower, II: A+B-, III: A+C-, IV: B+C-, V: B+A-,
// VI: C+A-). Also checks that code 1 with direction 0 gives C upper and
// A lower, that walking the Hall sequence advances the mode by one, and
// that no leg ever has both transistors on.
module tb_comm_lut;
  import bldc_pkg::*;
  logic [2:0] hall;
  logic dir;
  mode_t mode;
  gates_t g;
  int checks = 0, failures = 0;

  comm_lut dut (.hall, .direction(dir), .mode, .gates(g));

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // expected {a_up,b_up,c_up,a_lo,b_lo,c_lo} per mode 0..6
  logic [5:0] tbl [7] = '{6'b000000, 6'b001010, 6'b100010, 6'b100001,
                          6'b010001, 6'b010100, 6'b001100};
  // forward mode of each Hall code (0/7 invalid)
  int fwd [8] = '{0, 6, 2, 1, 4, 5, 3, 0};
  int seq [6] = '{3, 2, 6, 4, 5, 1};

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 2; d++)
      for (int c = 0; c < 8; c++) begin
        int em;
        hall = 3'(c); dir = d[0]; #1;
        em = (fwd[c] == 0) ? 0 : (d == 0) ? fwd[c] : ((fwd[c] + 2) % 6) + 1;
        chk(int'(mode) == em, $sformatf("dir %0d code %0d: mode %0d expected %0d", d, c, mode, em));
        chk(g == tbl[em], $sformatf("dir %0d code %0d: gates %b", d, c, g));
        chk(!(g.a_up && g.a_lo) && !(g.b_up && g.b_lo) && !(g.c_up && g.c_lo), "no shoot-through");
      end
    hall = 3'd1; dir = 0; #1;
    chk(g.c_up && g.a_lo && $countones(g) == 2, "code 1: C upper, A lower");
    for (int k = 0; k < 6; k++) begin
      int m0, m1;
      hall = 3'(seq[k]); dir = 0; #1; m0 = int'(mode);
      hall = 3'(seq[(k + 1) % 6]); #1; m1 = int'(mode);
      chk(m1 == (m0 % 6) + 1, "Hall sequence advances the mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
