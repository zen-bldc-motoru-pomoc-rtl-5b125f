// tb_dma_interleave - frames written by the measurement loop must come out
// of the host FIFO as six words in the order Ia, Ib, Ic, torque, G,
// trigger; a full FIFO loses words and sets the sticky overflow flag,
// which stays set until cleared; a frame arriving while the previous one
// is still being written is dropped and flagged.
module tb_dma_interleave;
  import bldc_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0, fv = 0, trig = 0, clr = 0, rd = 0, empty, ovf;
  q16_t ia, ib, ic, g;
  logic signed [15:0] tq;
  logic [31:0] rdata;
  logic [$clog2(DEPTH):0] level;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dma_interleave #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .frame_valid(fv), .ia, .ib, .ic,
    .torque(tq), .g, .comm_trig(trig), .clr_ovf(clr), .rd_en(rd), .rd_data(rdata),
    .empty, .level, .overflow(ovf));

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

  logic [31:0] exp_q [$];

  task automatic frame(input bit expect_stored);
    ia = q16_t'($urandom); ib = q16_t'($urandom); ic = q16_t'($urandom);
    tq = 16'($urandom); g = q16_t'($urandom); trig = 1'($urandom);
    @(negedge clk); fv = 1; @(negedge clk); fv = 0;
    if (expect_stored) begin
      exp_q.push_back(ia); exp_q.push_back(ib); exp_q.push_back(ic);
      exp_q.push_back(32'(tq)); exp_q.push_back(g); exp_q.push_back({31'd0, trig});
    end
    repeat (7) @(negedge clk);
  endtask

  task automatic drain();
    while (!empty) begin
      logic [31:0] e;
      @(negedge clk); rd = 1; @(negedge clk); rd = 0;
      e = (exp_q.size() > 0) ? exp_q.pop_front() : 32'hDEAD_BEEF;
      chk(rdata == e, $sformatf("word %h expected %h", rdata, e));
    end
    chk(exp_q.size() == 0, "all expected words read");
  endtask

  initial begin
    ia = '0; ib = '0; ic = '0; g = '0; tq = '0;
    repeat (3) @(negedge clk); rst_n = 1;
    frame(1); frame(1);
    chk(level == 12, $sformatf("level %0d after two frames", level));
    chk(!ovf, "no overflow yet");
    drain();
    // fill: 2 frames fit (12 words), the third loses 2 of its words
    frame(1); frame(1);
    ia = '0;
    frame(0);
    chk(ovf, "overflow flagged when FIFO full");
    // the first 4 words of the third frame did get in
    begin
      logic [31:0] w [$];
      w = exp_q;   // remember first 12
      exp_q.delete();
      for (int k = 0; k < 12; k++) exp_q.push_back(w[k]);
    end
    repeat (12) begin @(negedge clk); rd = 1; @(negedge clk); rd = 0;
      chk(rdata == exp_q.pop_front(), "stored words intact"); end
    repeat (4) begin @(negedge clk); rd = 1; @(negedge clk); rd = 0; end
    chk(empty, "FIFO empty after reading everything");
    chk(ovf, "overflow flag is sticky");
    // a later frame that fits must not clear the flag either
    frame(0);
    chk(ovf, "overflow flag survives a good frame");
    repeat (6) begin @(negedge clk); rd = 1; @(negedge clk); rd = 0; end
    chk(empty, "good frame drained");
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    chk(!ovf, "overflow cleared");
    // back-to-back frames: the second is dropped and flagged
    @(negedge clk); fv = 1; @(negedge clk); @(negedge clk); fv = 0;
    repeat (8) @(negedge clk);
    chk(ovf, "frame during write flagged");
    chk(level == 6, "only one frame stored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
