// pixel_cell: digital control unit of one ToPiX pixel.
//
// The comparator output, gated off when the mask bit of the configuration register is
// set, is watched for edges. At its rising edge the value on the time stamp bus is stored
// in le_reg (arrival time); at its falling edge the bus value is stored in te_reg, so that
// te - le is the time over threshold, a measure of the deposited charge. With both stored,
// the pixel raises busy, which is ORed into the column's busy chain (busy_out = busy_in |
// busy). The pixel whose busy_in is low while it is busy itself is the one that wins the
// fixed-priority chain; while the column controller holds rd it drives its address and its
// two time stamps on the column buses (drv high), and rd_ack clears it. A pixel that is
// waiting for readout ignores new comparator pulses.
//
// Configuration: the configuration register is written through te_reg. With cfg_sel high,
// cfg_wr stores the time stamp bus into te_reg and cfg_load then copies te_reg into the
// SEU-protected configuration register; cfg_rd drives the configuration word on the
// trailing-edge field of the data bus. Hits are only processed while run is high.
//
// The chip's pixel logic is asynchronous; this model is synchronous to the 160 MHz clk
// and sees a comparator edge at the first clock edge after it, which quantises the time
// stamps to the same 6.25 ns bin. The configuration bit layout (bit 0 mask, bit 1 test
// enable, bits 11:2 threshold trim), the read handshake and the reset behaviour are this
// design's choices.
module pixel_cell
  import topix_pkg::*;
#(
  parameter logic [ADDR_W-1:0] ADDR    = '0,
  parameter bit                HAMMING = 1'b0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,       // data taking phase
  input  logic              comp,      // comparator output
  input  logic [TS_W-1:0]   ts_bus,    // time stamp bus (Gray code) or configuration data
  // readout
  input  logic              busy_in,   // OR of the busy of all higher-priority pixels
  output logic              busy_out,
  input  logic              rd,        // column controller reads this column
  input  logic              rd_ack,    // last read cycle: the selected pixel clears
  output logic              drv,       // this pixel drives the buses
  output logic [ADDR_W-1:0] addr_o,
  output logic [TS_W-1:0]   le_o,
  output logic [TS_W-1:0]   te_o,
  // configuration
  input  logic              cfg_sel,
  input  logic              cfg_wr,
  input  logic              cfg_load,
  input  logic              cfg_rd,
  output logic [CFG_W-1:0]  cfg_q
);

  typedef enum logic [1:0] {PX_IDLE, PX_WAIT_TE, PX_FULL} px_state_e;

  px_state_e       state_q;
  logic            hit, hit_q;
  logic [TS_W-1:0] le_q, te_q;
  logic            busy, sel;

  seu_cfg_reg #(.W(CFG_W), .HAMMING(HAMMING)) u_cfg (
    .clk, .rst_n,
    .load(cfg_sel && cfg_load),
    .d   (te_q),
    .q   (cfg_q)
  );

  assign hit      = comp && !cfg_q[CFG_MASK_BIT];
  assign busy     = (state_q == PX_FULL);
  assign busy_out = busy_in || busy;
  assign sel      = busy && !busy_in && rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= PX_IDLE;
      hit_q   <= 1'b0;
      le_q    <= '0;
      te_q    <= '0;
    end else begin
      hit_q <= hit && run;
      if (!run) begin
        state_q <= PX_IDLE;
        if (cfg_sel && cfg_wr) te_q <= ts_bus;
      end else begin
        unique case (state_q)
          PX_IDLE:    if (hit && !hit_q) begin
                        le_q    <= ts_bus;
                        state_q <= PX_WAIT_TE;
                      end
          PX_WAIT_TE: if (!hit) begin
                        te_q    <= ts_bus;
                        state_q <= PX_FULL;
                      end
          PX_FULL:    if (sel && rd_ack) state_q <= PX_IDLE;
          default:    state_q <= PX_IDLE;
        endcase
      end
    end
  end

  always_comb begin
    drv    = 1'b0;
    addr_o = '0;
    le_o   = '0;
    te_o   = '0;
    if (sel) begin
      drv    = 1'b1;
      addr_o = ADDR;
      le_o   = le_q;
      te_o   = te_q;
    end else if (cfg_sel && cfg_rd) begin
      drv    = 1'b1;
      addr_o = ADDR;
      te_o   = cfg_q;
    end
  end

endmodule
