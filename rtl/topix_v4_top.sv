// topix_v4_top: digital readout of the ToPiX v4 pixel readout prototype.
//
// 640 pixels in four double columns: 2x32, 2x128, 2x128 and 2x32 pixels from left to
// right. Each double column has a column controller and a 32-word FIFO; the chip control
// unit (ccu) reads the four FIFOs and sends the hits out on one 320 Mb/s serial link
// (two bits per 160 MHz clock on ser_out), distributes the Gray-coded time stamp to all
// columns, and takes configuration commands on a serial interface (si_en, si_data).
// The pixel configuration registers of the first two double columns (pixels 0-319) are
// protected by triple modular redundancy, those of the last two (320-639) by a Hamming
// code, as in the prototype.
//
// The analog front ends (preamplifier, comparator, threshold DAC) are outside this RTL:
// comp[i] is the comparator output of pixel i and pix_cfg[i] its configuration word,
// whose bits 11:2 set the threshold DAC and bit 1 enables the test pulse. Pixel i is
// numbered as in the prototype: double column c starts at pixel col_base(c), and within
// it pixel side*rows + row has address {side, row[6:0]} in the output frames.
// The column bus sense amplifiers, the differential time stamp bus drivers and the SLVS
// pads are modelled as plain digital connections.
module topix_v4_top
  import topix_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NPIX-1:0]           comp,
  input  logic                      si_en,
  input  logic                      si_data,
  output logic [1:0]                ser_out,
  output logic [NPIX-1:0][CFG_W-1:0] pix_cfg,
  output logic [7:0]                cmd_err
);

  localparam int unsigned FIFO_CW = $clog2(FIFO_DEPTH + 1);

  logic                     run;
  logic [TS_W-1:0]          ts_bus;
  logic [NCOL-1:0]          fifo_empty, fifo_rd, fifo_wr, fifo_full;
  hit_t [NCOL-1:0]          fifo_rdata, fifo_wdata;
  logic [NCOL-1:0]          cfg_req, cfg_done;
  logic                     cfg_write;
  logic [ADDR_W-1:0]        cfg_addr;
  logic [NCOL-1:0][CFG_W-1:0] cfg_rdata;

  ccu #(.NC(NCOL)) u_ccu (
    .clk, .rst_n, .si_en, .si_data, .ser_out, .run, .ts_bus,
    .fifo_empty, .fifo_rdata, .fifo_rd,
    .cfg_req, .cfg_write, .cfg_addr, .cfg_done, .cfg_rdata, .cmd_err
  );

  for (genvar c = 0; c < NCOL; c++) begin : g_col
    localparam int unsigned ROWS = col_rows(c);
    localparam int unsigned BASE = col_base(c);

    logic [1:0]        busy, rd;
    logic              rd_ack, dc_cfg_wr, dc_cfg_load, dc_cfg_rd;
    logic [ADDR_W-1:0] bus_addr, dc_cfg_addr;
    logic [TS_W-1:0]   bus_le, bus_te;
    logic [FIFO_CW-1:0] count;

    double_column #(.ROWS(ROWS), .HAMMING(c >= NCOL / 2)) u_dc (
      .clk, .rst_n, .run,
      .comp    (comp[BASE +: 2*ROWS]),
      .ts_bus,
      .busy, .rd, .rd_ack,
      .bus_addr, .bus_le, .bus_te,
      .cfg_addr(dc_cfg_addr),
      .cfg_wr  (dc_cfg_wr),
      .cfg_load(dc_cfg_load),
      .cfg_rd  (dc_cfg_rd),
      .pix_cfg (pix_cfg[BASE +: 2*ROWS])
    );

    column_controller u_cc (
      .clk, .rst_n, .run,
      .busy, .rd, .rd_ack,
      .bus_addr, .bus_le, .bus_te,
      .cfg_addr  (dc_cfg_addr),
      .cfg_wr    (dc_cfg_wr),
      .cfg_load  (dc_cfg_load),
      .cfg_rd    (dc_cfg_rd),
      .fifo_wr   (fifo_wr[c]),
      .fifo_wdata(fifo_wdata[c]),
      .fifo_full (fifo_full[c]),
      .cfg_req   (cfg_req[c]),
      .cfg_write,
      .cfg_addr_i(cfg_addr),
      .cfg_done  (cfg_done[c]),
      .cfg_rdata (cfg_rdata[c])
    );

    column_fifo #(.DEPTH(FIFO_DEPTH), .W(HIT_W)) u_fifo (
      .clk, .rst_n,
      .wr_en  (fifo_wr[c]),
      .wr_data(fifo_wdata[c]),
      .full   (fifo_full[c]),
      .rd_en  (fifo_rd[c]),
      .rd_data(fifo_rdata[c]),
      .empty  (fifo_empty[c]),
      .count
    );
  end

endmodule
