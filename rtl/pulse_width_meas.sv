// pulse_width_meas - high-period measurement of one Hall line in microseconds.
//
// A 1 us prescaler divides the clock by TICKS_PER_US. While sig is high the
// microsecond counter runs; on the falling edge the count is stored in
// width_us and valid pulses for one clock. The count saturates at the largest
// W-bit value, so a very long high time reads as the maximum width (a line
// that stops changing publishes nothing new). The speed loop
// uses the width of Hall A to compute RPM. Microsecond unit and 16-bit width
// follow the original controller; the prescaler, saturation and edge rule are
// choices of this design.
module pulse_width_meas #(
  parameter int unsigned TICKS_PER_US = 40,
  parameter int unsigned W            = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sig,
  output logic [W-1:0] width_us,
  output logic         valid
);

  localparam int unsigned PW = $clog2(TICKS_PER_US + 1);

  logic          sig_q;
  logic [PW-1:0] pre;
  logic [W-1:0]  cnt;
  logic          us_tick;

  assign us_tick = (pre >= PW'(TICKS_PER_US - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sig_q    <= 1'b0;
      pre      <= '0;
      cnt      <= '0;
      width_us <= '0;
      valid    <= 1'b0;
    end else begin
      sig_q <= sig;
      valid <= 1'b0;
      if (sig && !sig_q) begin            // rising edge: start a new period
        pre <= PW'(1);                    // the edge clock counts
        cnt <= '0;
      end else if (sig) begin
        pre <= us_tick ? '0 : pre + 1'b1;
        if (us_tick && cnt != '1) cnt <= cnt + 1'b1;
      end
      if (!sig && sig_q) begin            // falling edge: publish
        width_us <= cnt;
        valid    <= 1'b1;
      end
    end
  end

endmodule
