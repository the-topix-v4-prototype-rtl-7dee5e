// double_column: two columns of ROWS pixel cells sharing one set of column buses.
//
// Both columns of a double column share the time stamp bus (driven by the chip control
// unit), the address bus and the data bus (leading and trailing edge time stamps), which
// run to the column controller at the bottom. Each column has its own busy chain: the
// input of its top pixel (row ROWS-1) is tied low and the chain runs down to row 0, whose
// output is the column's busy[side]. Within a column the highest busy row therefore wins.
// The column controller reads one column at a time (rd[side]).
//
// Pixel address = {side, row} on ADDR_W bits; side 0 is the left column. In the chip the
// buses are shared wires with sense amplifiers at the bottom; here only one pixel drives
// at a time, and the bus value is the OR of all drivers' gated outputs. Configuration
// accesses select the single pixel whose address equals cfg_addr.
//
// ROWS is 128 for the central double columns of the prototype and 32 for the outer ones.
// HAMMING selects the SEU protection of the pixel configuration registers.
module double_column
  import topix_pkg::*;
#(
  parameter int unsigned ROWS    = 128,
  parameter bit          HAMMING = 1'b0
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        run,
  input  logic [2*ROWS-1:0]           comp,     // index side*ROWS + row
  input  logic [TS_W-1:0]             ts_bus,
  output logic [1:0]                  busy,
  input  logic [1:0]                  rd,
  input  logic                        rd_ack,
  output logic [ADDR_W-1:0]           bus_addr,
  output logic [TS_W-1:0]             bus_le,
  output logic [TS_W-1:0]             bus_te,
  input  logic [ADDR_W-1:0]           cfg_addr,
  input  logic                        cfg_wr,
  input  logic                        cfg_load,
  input  logic                        cfg_rd,
  output logic [2*ROWS-1:0][CFG_W-1:0] pix_cfg
);

  localparam int unsigned NP = 2 * ROWS;

  initial assert (ROWS <= (1 << (ADDR_W - 1))) else $error("double_column: ROWS too large for ADDR_W");

  logic [1:0][ROWS:0]          chain;    // chain[side][row+1] is the busy_in of row
  logic [NP-1:0]               drv;
  logic [NP-1:0][ADDR_W-1:0]   p_addr;
  logic [NP-1:0][TS_W-1:0]     p_le, p_te;

  for (genvar s = 0; s < 2; s++) begin : g_side
    assign chain[s][ROWS] = 1'b0;
    assign busy[s]        = chain[s][0];
    for (genvar r = 0; r < ROWS; r++) begin : g_row
      localparam logic [ADDR_W-1:0] A = ADDR_W'((s << (ADDR_W - 1)) | r);
      pixel_cell #(.ADDR(A), .HAMMING(HAMMING)) u_px (
        .clk, .rst_n, .run,
        .comp    (comp[s*ROWS+r]),
        .ts_bus,
        .busy_in (chain[s][r+1]),
        .busy_out(chain[s][r]),
        .rd      (rd[s]),
        .rd_ack,
        .drv     (drv[s*ROWS+r]),
        .addr_o  (p_addr[s*ROWS+r]),
        .le_o    (p_le[s*ROWS+r]),
        .te_o    (p_te[s*ROWS+r]),
        .cfg_sel (cfg_addr == A),
        .cfg_wr, .cfg_load, .cfg_rd,
        .cfg_q   (pix_cfg[s*ROWS+r])
      );
    end
  end

  // Wired bus: OR of the (zero when not driving) outputs of all pixels.
  always_comb begin
    bus_addr = '0;
    bus_le   = '0;
    bus_te   = '0;
    for (int unsigned i = 0; i < NP; i++) begin
      bus_addr |= p_addr[i];
      bus_le   |= p_le[i];
      bus_te   |= p_te[i];
    end
  end

  // At most one pixel may drive the shared buses.
  a_one_driver: assert property (@(posedge clk) disable iff (!rst_n) $countones(drv) <= 1)
    else $error("double_column: %0d pixels drive the bus", $countones(drv));

endmodule
