// sync_fifo - single-clock first-in first-out buffer held in an inferred RAM.
//
// DEPTH words of W bits (DEPTH a power of two). A write with full set is
// dropped and a read with empty set returns nothing; the caller checks the
// flags. rd_data is registered: it is valid on the clock after rd_en.
module sync_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         full,
  output logic         empty,
  output logic [$clog2(DEPTH):0] level
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW:0]   wp, rp;
  logic          do_wr, do_rd;

  assign full  = (wp - rp) == (AW+1)'(DEPTH);
  assign empty = (wp == rp);
  assign level = wp - rp;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= wr_data;
    if (do_rd) rd_data <= mem[rp[AW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
  end

endmodule
