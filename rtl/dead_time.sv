// dead_time - turn-on delay (dead time) for the inverter gate signals.
//
// Each of the N outputs follows its request, except that a rising request is
// passed on only after it has stayed high for dt_ticks clocks; a falling
// request switches the output off on the next clock. When one transistor of
// a leg switches off and the other is requested on at the same time, the
// second therefore turns on dt_ticks clocks after the first has turned off,
// so the leg never conducts through both. The default of 50 ticks (1.25 us at
// 40 MHz) is the original inverter's setting; realising it as a per-gate
// turn-on delay is this design's choice. Outputs are registered.
module dead_time #(
  parameter int unsigned N    = 6,
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] dt_ticks,
  input  logic [N-1:0]     req,
  output logic [N-1:0]     gate
);

  logic [CNT_W-1:0] cnt [N];

  for (genvar i = 0; i < N; i++) begin : g_ch
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt[i]  <= '0;
        gate[i] <= 1'b0;
      end else if (!req[i]) begin
        cnt[i]  <= '0;
        gate[i] <= 1'b0;
      end else if (cnt[i] >= dt_ticks) begin
        gate[i] <= 1'b1;
      end else begin
        cnt[i] <= cnt[i] + 1'b1;
      end
    end
  end

endmodule
