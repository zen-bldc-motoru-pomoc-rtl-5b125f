// hall_filter - sampling and noise filter for the three Hall-sensor lines.
//
// The Hall inputs are synchronised to the 40 MHz clock and sampled once every
// SAMPLE_TICKS clocks (280 = 7 us, the Hall loop's update rate). A filtered
// line takes a new level only after that level has been seen on filt_cycles
// consecutive samples; shorter glitches, such as noise picked up on long
// sensor wires, are ignored. 10 to 15 samples are a typical setting.
// The persistence-counter structure, the two-flop synchroniser and the reset
// level 0 are choices of this design; the sample period and the 16-bit
// "cycles to filter" control come from the original controller.
//
// Timing: sample_stb pulses for one clock on each sample; hall_out changes on
// the clock after the sample that completes the persistence count.
module hall_filter #(
  parameter int unsigned SAMPLE_TICKS = 280,
  parameter int unsigned CNT_W        = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [2:0]       hall_in,      // bit0 = A, bit1 = B, bit2 = C
  input  logic [CNT_W-1:0] filt_cycles,  // samples a new level must persist (0 acts as 1)
  output logic [2:0]       hall_out,
  output logic             sample_stb
);

  localparam int unsigned DIV_W = $clog2(SAMPLE_TICKS + 1);

  logic [2:0]       sync1, sync2;
  logic [DIV_W-1:0] div;
  logic [CNT_W-1:0] cnt [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1 <= '0;
      sync2 <= '0;
    end else begin
      sync1 <= hall_in;
      sync2 <= sync1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div        <= '0;
      sample_stb <= 1'b0;
    end else begin
      sample_stb <= 1'b0;
      if (div == DIV_W'(SAMPLE_TICKS - 1)) begin
        div        <= '0;
        sample_stb <= 1'b1;
      end else begin
        div <= div + 1'b1;
      end
    end
  end

  for (genvar i = 0; i < 3; i++) begin : g_line
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt[i]      <= '0;
        hall_out[i] <= 1'b0;
      end else if (sample_stb) begin
        if (sync2[i] == hall_out[i]) begin
          cnt[i] <= '0;
        end else if (cnt[i] + 1'b1 >= filt_cycles) begin
          cnt[i]      <= '0;
          hall_out[i] <= sync2[i];
        end else begin
          cnt[i] <= cnt[i] + 1'b1;
        end
      end
    end
  end

endmodule
