// rpm_calc - motor speed from the Hall A high period.
//
// With T the high period in microseconds per pulse and PULSES_PER_REV pulses
// per revolution, one revolution takes T*PULSES_PER_REV/1e6 seconds, so
//   RPM = 60 / (T * PULSES_PER_REV / 1e6) = 60e6 / (PULSES_PER_REV * T).
// This formula and the 12 pulses per revolution are those of the original
// controller. The result is produced in Q16.16 by dividing (60e6/PPR) << 16
// by T with a bit-serial divider; done pulses when rpm has been updated,
// 49 clocks after start. T = 0 gives the largest positive value; results
// above the Q16.16 range saturate.
module rpm_calc
  import bldc_pkg::*;
#(
  parameter int unsigned PULSES_PER_REV = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] width_us,
  output q16_t        rpm,
  output logic        done
);

  localparam int unsigned DW = 48;
  localparam logic [DW-1:0] NUM = DW'(64'd60_000_000 / PULSES_PER_REV) << 16;

  logic [DW-1:0] quo, rem;
  logic          busy, dv_done;

  seq_divider #(.W(DW)) u_div (
    .clk, .rst_n, .start,
    .dividend (NUM),
    .divisor  (DW'(width_us)),
    .quotient (quo),
    .remainder(rem),
    .busy,
    .done     (dv_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rpm  <= '0;
      done <= 1'b0;
    end else begin
      done <= dv_done;
      if (dv_done) rpm <= (quo > DW'(32'h7FFF_FFFF)) ? 32'sh7FFF_FFFF : q16_t'(quo[31:0]);
    end
  end

endmodule
