// seq_divider - unsigned restoring divider, one quotient bit per clock.
//
// start loads dividend and divisor; W clocks later done pulses with
// quotient = dividend / divisor and the remainder. busy is high meanwhile and
// a start during busy is ignored. Division by zero returns an all-ones
// quotient, which the callers treat as saturation. Used for the speed
// formula and for the ratio of the two H functions of the sensorless loop.
module seq_divider #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder,
  output logic         busy,
  output logic         done
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  q, d;
  logic [W:0]    r;
  logic [CW-1:0] n;
  logic [W:0]    r_sh;
  logic [W:0]    r_sub;

  assign r_sh  = {r[W-1:0], q[W-1]};
  assign r_sub = r_sh - {1'b0, d};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; d <= '0; r <= '0; n <= '0;
      busy <= 1'b0; done <= 1'b0;
      quotient <= '0; remainder <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          q    <= dividend;
          d    <= divisor;
          r    <= '0;
          n    <= CW'(W);
          busy <= 1'b1;
        end
      end else begin
        if (!r_sub[W]) begin
          r <= r_sub;
          q <= {q[W-2:0], 1'b1};
        end else begin
          r <= r_sh;
          q <= {q[W-2:0], 1'b0};
        end
        n <= n - 1'b1;
        if (n == CW'(1)) begin
          busy      <= 1'b0;
          done      <= 1'b1;
          quotient  <= (d == '0) ? '1 : {q[W-2:0], ~r_sub[W]};
          remainder <= !r_sub[W] ? r_sub[W-1:0] : r_sh[W-1:0];
        end
      end
    end
  end

endmodule
