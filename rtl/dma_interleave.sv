// dma_interleave - interleaves the measurement loop's results into one
// stream towards the host.
//
// Only a few DMA channels exist, so each measurement frame is written as
// NW consecutive 32-bit words into one FIFO:
//   0: ia  1: ib  2: ic (Q16.16 mA)  3: torque feedback (sign-extended code)
//   4: G value (Q16.16)  5: commutation trigger (0 or 1)
// frame_valid latches a frame and the words are written on the following
// NW clocks. Writes never wait (timeout 0): a word that finds the FIFO full
// is lost and sets the sticky overflow flag, which only clr_ovf clears. A
// frame that arrives while the previous one is still being written is
// dropped and also flags an overflow. The host side reads the FIFO through
// rd_en/rd_data (data one clock after rd_en). Interleaving, zero timeout and
// the sticky overflow flag follow the original loop; the word order and the
// FIFO depth are choices of this design.
module dma_interleave
  import bldc_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_valid,
  input  q16_t        ia,
  input  q16_t        ib,
  input  q16_t        ic,
  input  logic signed [15:0] torque,
  input  q16_t        g,
  input  logic        comm_trig,
  input  logic        clr_ovf,
  input  logic        rd_en,
  output logic [31:0] rd_data,
  output logic        empty,
  output logic [$clog2(DEPTH):0] level,
  output logic        overflow
);

  localparam int unsigned NW = 6;

  logic [31:0] frame [NW];
  logic [2:0]  idx;
  logic        active, full, wr_en;

  assign wr_en = active;

  sync_fifo #(.W(32), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en, .wr_data(frame[idx]), .rd_en, .rd_data,
    .full, .empty, .level);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NW; i++) frame[i] <= '0;
      idx <= '0; active <= 1'b0; overflow <= 1'b0;
    end else begin
      if (clr_ovf) overflow <= 1'b0;
      if (active && full) overflow <= 1'b1;
      if (active) begin
        if (idx == 3'(NW - 1)) begin
          active <= 1'b0;
          idx    <= '0;
        end else idx <= idx + 1'b1;
      end
      if (frame_valid) begin
        if (active) overflow <= 1'b1;
        else begin
          frame[0] <= ia;
          frame[1] <= ib;
          frame[2] <= ic;
          frame[3] <= 32'(torque);
          frame[4] <= g;
          frame[5] <= {31'd0, comm_trig};
          active   <= 1'b1;
          idx      <= '0;
        end
      end
    end
  end

endmodule
