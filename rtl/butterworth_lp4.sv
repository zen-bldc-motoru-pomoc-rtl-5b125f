// butterworth_lp4 - 4th-order Butterworth low-pass filter for one current
// channel, built from two fixed-point biquad sections.
//
// The default design is a 1 kHz cut-off at an expected 100 kS/s sample rate,
// the filter configuration of the original current loop, with output of the
// same type as the input (W-bit signed ADC codes). The coefficients are
// computed at elaboration by the bilinear transform with pre-warping:
//   K = tan(pi*FC/FS);  Q1 = 1/(2cos(pi/8)), Q2 = 1/(2cos(3pi/8))
//   n = 1/(1 + K/Q + K^2); b0 = K^2*n; b1 = 2*b0; b2 = b0;
//   a1 = 2*(K^2 - 1)*n; a2 = (1 - K/Q + K^2)*n
// and rounded to Q3.28. The sections work on the sample extended by GUARD
// fractional bits, so that the small b0 (about 9e-4 at the defaults) does
// not cost resolution; the output is rounded back to W bits and saturated.
// The two-biquad structure and the number formats are choices of this
// design. in_valid takes a sample; out_valid and y follow two clocks later.
module butterworth_lp4 #(
  parameter int unsigned W     = 16,
  parameter int unsigned GUARD = 16,
  parameter int unsigned FC_HZ = 1000,
  parameter int unsigned FS_HZ = 100000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clr,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] y,
  output logic                out_valid
);

  localparam real PI  = 3.14159265358979323846;
  localparam real K   = $tan(PI * real'(FC_HZ) / real'(FS_HZ));
  localparam real QA  = 1.0 / (2.0 * $cos(PI / 8.0));
  localparam real QB  = 1.0 / (2.0 * $cos(3.0 * PI / 8.0));
  localparam real NA  = 1.0 / (1.0 + K / QA + K * K);
  localparam real NB  = 1.0 / (1.0 + K / QB + K * K);

  function automatic logic signed [31:0] q28(input real v);
    return 32'($rtoi(v * 268435456.0 + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  localparam logic signed [31:0] A_B0 = q28(K * K * NA);
  localparam logic signed [31:0] A_B1 = q28(2.0 * K * K * NA);
  localparam logic signed [31:0] A_A1 = q28(2.0 * (K * K - 1.0) * NA);
  localparam logic signed [31:0] A_A2 = q28((1.0 - K / QA + K * K) * NA);
  localparam logic signed [31:0] B_B0 = q28(K * K * NB);
  localparam logic signed [31:0] B_B1 = q28(2.0 * K * K * NB);
  localparam logic signed [31:0] B_A1 = q28(2.0 * (K * K - 1.0) * NB);
  localparam logic signed [31:0] B_A2 = q28((1.0 - K / QB + K * K) * NB);

  localparam int unsigned DW = W + GUARD + 2;

  logic signed [DW-1:0] s0, s1, s2;
  logic                 v1, v2;
  logic signed [DW-1:0] r;

  localparam logic signed [DW-1:0] YMAX = DW'(signed'({1'b0, {(W-1){1'b1}}}));

  assign s0 = DW'(x) <<< GUARD;

  biquad #(.DW(DW), .B0(A_B0), .B1(A_B1), .B2(A_B0), .A1(A_A1), .A2(A_A2)) u_sa (
    .clk, .rst_n, .clr, .in_valid, .x(s0), .y(s1), .out_valid(v1));

  biquad #(.DW(DW), .B0(B_B0), .B1(B_B1), .B2(B_B0), .A1(B_A1), .A2(B_A2)) u_sb (
    .clk, .rst_n, .clr, .in_valid(v1), .x(s1), .y(s2), .out_valid(v2));

  always_comb begin
    r = (s2 + (DW'(1) <<< (GUARD - 1))) >>> GUARD;
    if (r > YMAX)       y = YMAX[W-1:0];
    else if (r < -YMAX) y = -YMAX[W-1:0];
    else                y = r[W-1:0];
  end

  assign out_valid = v2;

endmodule
