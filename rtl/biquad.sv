// biquad - one second-order IIR section in direct form I, fixed point.
//
//   y(k) = b0*x(k) + b1*x(k-1) + b2*x(k-2) - a1*y(k-1) - a2*y(k-2)
//
// Coefficients are Q3.28 (signed 32 bit). Samples are DW-bit signed values;
// the section keeps FW extra fractional bits on its output so that a chain of
// sections does not lose precision, i.e. x and y are Q(DW-FW).FW numbers with
// the same scale. A new sample is taken when in_valid is high; y and
// out_valid follow one clock later. clr empties the delay line.
module biquad #(
  parameter int unsigned     DW = 32,
  parameter logic signed [31:0] B0 = 32'sd268435456,
  parameter logic signed [31:0] B1 = 32'sd0,
  parameter logic signed [31:0] B2 = 32'sd0,
  parameter logic signed [31:0] A1 = 32'sd0,
  parameter logic signed [31:0] A2 = 32'sd0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clr,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x,
  output logic signed [DW-1:0] y,
  output logic                 out_valid
);

  localparam int unsigned AW = DW + 36;

  logic signed [DW-1:0] x1, x2, y1, y2;
  logic signed [AW-1:0] acc, acc_sh;
  logic signed [DW-1:0] y_n;

  localparam logic signed [AW-1:0] YMAX = AW'(signed'({1'b0, {(DW-1){1'b1}}}));

  always_comb begin
    acc = AW'(B0) * AW'(x) + AW'(B1) * AW'(x1) + AW'(B2) * AW'(x2)
        - AW'(A1) * AW'(y1) - AW'(A2) * AW'(y2);
    acc_sh = (acc + (AW'(1) <<< 27)) >>> 28;    // round to nearest
    if (acc_sh > YMAX)       y_n = YMAX[DW-1:0];
    else if (acc_sh < -YMAX) y_n = -YMAX[DW-1:0];
    else                     y_n = acc_sh[DW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0; x2 <= '0; y1 <= '0; y2 <= '0; y <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (clr) begin
        x1 <= '0; x2 <= '0; y1 <= '0; y2 <= '0; y <= '0;
      end else if (in_valid) begin
        x2 <= x1; x1 <= x;
        y2 <= y1; y1 <= y_n;
        y  <= y_n;
        out_valid <= 1'b1;
      end
    end
  end

endmodule
