// timestamp_gen: time stamp generator of the chip control unit.
//
// A TS_W-bit binary counter advances on every 160 MHz clock edge, so one count is 6.25 ns
// and the 12-bit stamp wraps every 4096 counts (25.6 us). The value put on the time
// stamp bus is its Gray code, registered, so that exactly one bus line changes per step:
// a pixel that samples the slow column bus while it changes is off by at most one count.
// ts_bin is the binary value matching ts_gray (same cycle). Clearing with rst_n or clr
// restarts the count at 0. Gray coding of the bus follows the ToPiX v4 description; the
// synchronous clear is this design's choice.
module timestamp_gen
  import topix_pkg::*;
#(
  parameter int unsigned W = TS_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  output logic [W-1:0] ts_bin,
  output logic [W-1:0] ts_gray
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts_bin  <= '0;
      ts_gray <= '0;
    end else if (clr) begin
      ts_bin  <= '0;
      ts_gray <= '0;
    end else begin
      ts_bin  <= ts_bin + 1'b1;
      ts_gray <= (ts_bin + 1'b1) ^ ((ts_bin + 1'b1) >> 1);
    end
  end

endmodule
