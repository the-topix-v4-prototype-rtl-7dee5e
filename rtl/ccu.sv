// ccu: chip control unit of ToPiX v4 (single output link).
//
// The CCU does four things.
//  * Time stamp: timestamp_gen counts the 160 MHz clock; during data taking its Gray code
//    is driven on the time stamp bus of all double columns. The count restarts at 0 when
//    data taking starts.
//  * Configuration: config_interface delivers 32-bit commands (topix_pkg::cfg_cmd_t).
//    OP_MODE switches between the configuration phase (run low) and data taking (run
//    high). OP_CFG_WR, accepted only in the configuration phase, puts the configuration
//    word on the time stamp bus and asks the addressed column controller to load it into
//    the addressed pixel. OP_CFG_RD, accepted in both phases, has the column controller
//    read a pixel's configuration back; the word is sent out in a HDR_CFG frame. A command
//    that arrives while the previous configuration access is still in progress is dropped.
//  * Readout: the four column FIFOs are served round robin, one hit per output frame.
//  * Output: a one-frame buffer feeds the serializer, which sends 40-bit frames at two bits
//    per clock cycle (320 Mb/s at 160 MHz). A pending read-back frame goes before hits.
//
// Frame payloads (36 bits after the 4-bit header): data frames carry {col[1:0], addr[7:0],
// le[11:0], te[11:0], 2'b00}, with binary time stamps; read-back frames carry {col, addr,
// 12'b0, cfg[11:0], 2'b00}. That the CCU multiplexes the column FIFOs onto one serial link,
// generates the time stamp and uploads configuration through a serial interface follows
// the ToPiX v4 description; the arbitration, command set and frame format are this
// design's choices.
module ccu
  import topix_pkg::*;
#(
  parameter int unsigned NC = NCOL
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 si_en,
  input  logic                 si_data,
  output logic [1:0]           ser_out,
  output logic                 run,
  output logic [TS_W-1:0]      ts_bus,
  // column FIFOs
  input  logic [NC-1:0]        fifo_empty,
  input  hit_t [NC-1:0]        fifo_rdata,
  output logic [NC-1:0]        fifo_rd,
  // column controllers, configuration
  output logic [NC-1:0]        cfg_req,
  output logic                 cfg_write,
  output logic [ADDR_W-1:0]    cfg_addr,
  input  logic [NC-1:0]        cfg_done,
  input  logic [NC-1:0][CFG_W-1:0] cfg_rdata,
  output logic [7:0]           cmd_err    // malformed configuration frames seen
);

  localparam int unsigned CB = (NC > 1) ? $clog2(NC) : 1;

  cfg_cmd_t           cmd;
  logic               cmd_valid;
  logic [TS_W-1:0]    ts_bin, ts_gray;
  logic               ts_clr;

  logic               run_q;
  logic               busy_q;      // configuration access in progress
  logic [CB-1:0]      col_q;
  logic [ADDR_W-1:0]  addr_q;
  logic [CFG_W-1:0]   data_q;
  logic               write_q;
  logic               rb_v_q;      // read-back frame pending
  logic [FRAME_W-1:0] rb_q;        // read-back frame

  logic [FRAME_W-1:0] frame_q;
  logic               frame_v_q;
  logic               frame_ready;
  logic [CB-1:0]      rr_q;
  logic               pick_v;
  logic [CB-1:0]      pick;

  config_interface u_cfgif (
    .clk, .rst_n, .si_en, .si_data,
    .cmd_valid, .cmd, .err_count(cmd_err)
  );

  timestamp_gen #(.W(TS_W)) u_ts (
    .clk, .rst_n, .clr(ts_clr), .ts_bin, .ts_gray
  );

  serializer u_ser (
    .clk, .rst_n,
    .frame(frame_q), .frame_valid(frame_v_q), .frame_ready, .ser_out
  );

  assign run       = run_q;
  assign ts_bus    = run_q ? ts_gray : data_q;
  assign ts_clr    = cmd_valid && cmd.op == OP_MODE && cmd.data[0] && !run_q;
  assign cfg_write = write_q;
  assign cfg_addr  = addr_q;
  always_comb begin
    cfg_req = '0;
    cfg_req[col_q] = busy_q;
  end

  // Round-robin choice of the next non-empty FIFO, starting at rr_q.
  always_comb begin
    pick_v = 1'b0;
    pick   = rr_q;
    for (int unsigned k = 0; k < NC; k++) begin
      logic [CB-1:0] c;
      c = CB'((32'(rr_q) + k) % NC);
      if (!pick_v && !fifo_empty[c]) begin
        pick_v = 1'b1;
        pick   = c;
      end
    end
  end

  logic load_frame;
  assign load_frame = !frame_v_q && !rb_v_q && pick_v;
  always_comb begin
    fifo_rd = '0;
    if (load_frame) fifo_rd[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q     <= 1'b0;
      busy_q    <= 1'b0;
      col_q     <= '0;
      addr_q    <= '0;
      data_q    <= '0;
      write_q   <= 1'b0;
      rb_v_q    <= 1'b0;
      rb_q      <= '0;
      frame_q   <= '0;
      frame_v_q <= 1'b0;
      rr_q      <= '0;
    end else begin
      // commands
      if (cmd_valid) begin
        unique case (cmd.op)
          OP_MODE: run_q <= cmd.data[0];
          OP_CFG_WR, OP_CFG_RD:
            if (!busy_q && !(cmd.op == OP_CFG_WR && run_q) && 32'(cmd.col) < NC) begin
              busy_q  <= 1'b1;
              col_q   <= CB'(cmd.col);
              addr_q  <= cmd.addr;
              data_q  <= cmd.data;
              write_q <= (cmd.op == OP_CFG_WR);
            end
          default: ;
        endcase
      end
      // configuration access completion
      if (busy_q && cfg_done[col_q]) begin
        busy_q <= 1'b0;
        if (!write_q) begin
          rb_v_q <= 1'b1;
          rb_q   <= {HDR_CFG, 2'(col_q), addr_q, {TS_W{1'b0}}, cfg_rdata[col_q], 2'b00};
        end
      end
      // output frame buffer
      if (frame_v_q) begin
        if (frame_ready) frame_v_q <= 1'b0;
      end else if (rb_v_q) begin
        frame_q   <= rb_q;
        frame_v_q <= 1'b1;
        rb_v_q    <= 1'b0;
      end else if (pick_v) begin
        frame_q   <= {HDR_DATA, 2'(pick), fifo_rdata[pick], 2'b00};
        frame_v_q <= 1'b1;
        rr_q      <= CB'((32'(pick) + 1) % NC);
      end
    end
  end

endmodule
