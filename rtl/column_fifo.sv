// column_fifo: the 32-word FIFO that buffers the hits of one double column until the chip
// control unit reads them.
//
// Synchronous FIFO on one clock, written by the column controller and read by the CCU.
// The read side is first-word-fall-through: rd_data shows the oldest word whenever empty
// is low, and rd_en removes it. A write to a full FIFO or a read from an empty one is
// ignored (and flagged by an assertion); the column controller stalls instead of writing
// when full is high. DEPTH = 32 follows the ToPiX v4 description; the word width and the
// first-word-fall-through read are this design's choices.
module column_fifo #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned W     = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [W-1:0]               wr_data,
  output logic                       full,
  input  logic                       rd_en,
  output logic [W-1:0]               rd_data,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp_q, rp_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;
  logic do_wr, do_rd;

  assign full  = (cnt_q == ($bits(cnt_q))'(DEPTH));
  assign empty = (cnt_q == 0);
  assign count = cnt_q;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rd_data = mem[rp_q];

  always_ff @(posedge clk) if (do_wr) mem[wp_q] <= wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q  <= '0;
      rp_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_wr) wp_q <= (wp_q == AW'(DEPTH - 1)) ? '0 : wp_q + 1'b1;
      if (do_rd) rp_q <= (rp_q == AW'(DEPTH - 1)) ? '0 : rp_q + 1'b1;
      cnt_q <= cnt_q + ($bits(cnt_q))'(do_wr) - ($bits(cnt_q))'(do_rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full))
    else $error("column_fifo: write while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty))
    else $error("column_fifo: read while empty");

endmodule
