// serializer: output serializer of the chip control unit.
//
// Sends a continuous stream of FRAME_W-bit frames, two bits per 160 MHz clock cycle, which
// is the 320 Mb/s of the ToPiX v4 output link; ser_out[1] is the earlier bit of each
// pair, and frames go out most significant bit first. The frame offered on frame/
// frame_valid is taken (frame_ready high) in the cycle the last pair of the previous
// frame is sent; if none is offered, an idle frame (header HDR_IDLE, zero payload) is
// sent instead, so the receiver always finds a header every FRAME_W bits. A frame takes
// FRAME_W/2 = 20 cycles. The frame format and the two-bit-per-cycle output (to a
// double-data-rate pad driver) are this design's choices.
module serializer
  import topix_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [FRAME_W-1:0] frame,
  input  logic               frame_valid,
  output logic               frame_ready,
  output logic [1:0]         ser_out
);

  localparam int unsigned NPAIR = FRAME_W / 2;
  localparam logic [FRAME_W-1:0] IDLE_FRAME = {HDR_IDLE, {(FRAME_W-4){1'b0}}};

  logic [FRAME_W-1:0]       sh_q;
  logic [$clog2(NPAIR)-1:0] cnt_q;

  assign frame_ready = (cnt_q == $bits(cnt_q)'(NPAIR - 1));
  assign ser_out     = sh_q[FRAME_W-1 -: 2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_q  <= IDLE_FRAME;
      cnt_q <= '0;
    end else if (frame_ready) begin
      sh_q  <= frame_valid ? frame : IDLE_FRAME;
      cnt_q <= '0;
    end else begin
      sh_q  <= {sh_q[FRAME_W-3:0], 2'b00};
      cnt_q <= cnt_q + 1'b1;
    end
  end

endmodule
