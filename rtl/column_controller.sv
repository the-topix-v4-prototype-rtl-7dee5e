// column_controller: readout and configuration controller of one double column.
//
// Readout: when either busy chain of the double column is high and the column FIFO has
// room, the controller raises rd for that column (left column first when both are busy)
// for READ_CYCLES clock cycles. The winning pixel of the busy chain drives its address and
// its Gray-coded leading and trailing edge time stamps on the buses; on the last cycle the
// controller raises rd_ack, samples the buses, converts the time stamps to binary and
// writes the hit into the FIFO, and the pixel clears itself. One idle cycle follows, in
// which the busy chain settles, so a hit is read every READ_CYCLES+1 cycles. While the
// FIFO is full no read starts, and hit pixels wait in the matrix (stall).
//
// Configuration: a request from the chip control unit (cfg_req held until cfg_done) writes
// or reads the configuration register of pixel cfg_addr_i. A write raises cfg_wr for one
// cycle, which stores the time stamp bus (carrying the configuration word) into the
// pixel's te_reg, then cfg_load for one cycle, which copies it into the configuration
// register. A read raises cfg_rd for READ_CYCLES cycles and returns the trailing-edge
// field of the data bus in cfg_rdata.
//
// The state register is protected against single event upsets: the states are encoded
// at a Hamming distance of at least 3 from each other, a state word with one flipped bit
// is corrected to its state, and any other invalid word returns to IDLE.
//
// The readout order and the FIFO follow the ToPiX v4 description; the number of read
// cycles, the handshakes and the state codes are this design's choices.
module column_controller
  import topix_pkg::*;
#(
  parameter int unsigned READ_CYCLES = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  // double column
  input  logic [1:0]        busy,
  output logic [1:0]        rd,
  output logic              rd_ack,
  input  logic [ADDR_W-1:0] bus_addr,
  input  logic [TS_W-1:0]   bus_le,
  input  logic [TS_W-1:0]   bus_te,
  output logic [ADDR_W-1:0] cfg_addr,
  output logic              cfg_wr,
  output logic              cfg_load,
  output logic              cfg_rd,
  // column FIFO
  output logic              fifo_wr,
  output hit_t              fifo_wdata,
  input  logic              fifo_full,
  // configuration requests from the chip control unit
  input  logic              cfg_req,
  input  logic              cfg_write,     // 1 write, 0 read
  input  logic [ADDR_W-1:0] cfg_addr_i,
  output logic              cfg_done,
  output logic [CFG_W-1:0]  cfg_rdata
);

  typedef enum logic [5:0] {
    S_IDLE   = 6'b000000,
    S_READ   = 6'b000111,
    S_CFG_WR = 6'b011001,
    S_CFG_LD = 6'b101010,
    S_CFG_RD = 6'b110100
  } state_e;

  // Nearest valid state to a possibly upset state word.
  function automatic state_e fix_state(logic [5:0] s);
    if ($countones(s ^ S_READ)   <= 1) return S_READ;
    if ($countones(s ^ S_CFG_WR) <= 1) return S_CFG_WR;
    if ($countones(s ^ S_CFG_LD) <= 1) return S_CFG_LD;
    if ($countones(s ^ S_CFG_RD) <= 1) return S_CFG_RD;
    return S_IDLE;
  endfunction

  localparam int unsigned CW = (READ_CYCLES > 1) ? $clog2(READ_CYCLES) : 1;

  logic [5:0]    state_q;
  state_e        state, state_d;
  logic [CW-1:0] cnt_q, cnt_d;
  logic          side_q, side_d;
  logic          last;

  assign state = fix_state(state_q);
  assign last  = (cnt_q == CW'(READ_CYCLES - 1));

  always_comb begin
    state_d = state;
    cnt_d   = cnt_q;
    side_d  = side_q;
    unique case (state)
      S_IDLE: begin
        cnt_d = '0;
        if (cfg_req)                          state_d = cfg_write ? S_CFG_WR : S_CFG_RD;
        else if (run && |busy && !fifo_full) begin
          state_d = S_READ;
          side_d  = !busy[0];
        end
      end
      S_READ:   if (last) state_d = S_IDLE; else cnt_d = cnt_q + 1'b1;
      S_CFG_WR: state_d = S_CFG_LD;
      S_CFG_LD: state_d = S_IDLE;
      S_CFG_RD: if (last) state_d = S_IDLE; else cnt_d = cnt_q + 1'b1;
      default:  state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
      side_q  <= 1'b0;
    end else begin
      state_q <= state_d;
      cnt_q   <= cnt_d;
      side_q  <= side_d;
    end
  end

  always_comb begin
    rd        = '0;
    rd_ack    = 1'b0;
    fifo_wr   = 1'b0;
    cfg_wr    = 1'b0;
    cfg_load  = 1'b0;
    cfg_rd    = 1'b0;
    cfg_done  = 1'b0;
    cfg_addr  = cfg_addr_i;
    cfg_rdata = bus_te;
    fifo_wdata.addr = bus_addr;
    fifo_wdata.le   = gray2bin(bus_le);
    fifo_wdata.te   = gray2bin(bus_te);
    unique case (state)
      S_READ: begin
        rd[side_q] = 1'b1;
        rd_ack     = last;
        fifo_wr    = last;
      end
      S_CFG_WR: cfg_wr = 1'b1;
      S_CFG_LD: begin
        cfg_load = 1'b1;
        cfg_done = 1'b1;
      end
      S_CFG_RD: begin
        cfg_rd   = 1'b1;
        cfg_done = last;
      end
      default: ;
    endcase
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(fifo_wr && fifo_full))
    else $error("column_controller: FIFO write while full");

endmodule
