// tb_ccu: the chip control unit with models of the four column FIFOs (queues) and of the
// column controllers (which answer a configuration request a few cycles later).
// Checks: configuration writes reach the addressed column with the word on the time
// stamp bus; a read-back returns a HDR_CFG frame; a write during data taking is refused;
// the mode command starts data taking with the Gray time stamp restarting at 0; hits
// from all four FIFOs come out in data frames, served round robin while all are full.
module tb_ccu;
  import topix_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, si_en = 1'b0, si_data = 1'b0;
  logic [1:0] ser_out;
  logic run;
  logic [11:0] ts_bus;
  logic [3:0] fifo_empty, fifo_rd, cfg_req, cfg_done = '0;
  hit_t [3:0] fifo_rdata;
  logic cfg_write;
  logic [7:0] cfg_addr, cmd_err;
  logic [3:0][11:0] cfg_rdata = '0;
  hit_t fq[4][$];
  logic [39:0] frames[$], sh;
  int checks = 0, failures = 0, k = 0, n_req[4], req_age[4];
  logic [11:0] seen_data[$];

  always #5 clk = ~clk;

  ccu #(.NC(4)) dut (.*);

  function automatic void check(int id, logic [63:0] g, logic [63:0] exp);
    checks++;
    if (g !== exp) begin
      failures++;
      $display("FAIL check %0d: got %h expected %h", id, g, exp);
    end
  endfunction

  always_comb for (int c = 0; c < 4; c++) begin
    fifo_empty[c] = fq[c].size() == 0;
    fifo_rdata[c] = (fq[c].size() > 0) ? fq[c][0] : '0;
  end

  always @(posedge clk) if (rst_n) begin
    logic [39:0] f;
    for (int c = 0; c < 4; c++) if (fifo_rd[c]) void'(fq[c].pop_front());
    // column controller models: done 3 cycles after the request, data = 0xA00 | column
    for (int c = 0; c < 4; c++) begin
      cfg_done[c] <= 1'b0;
      if (cfg_req[c] && !cfg_done[c]) begin
        req_age[c] <= req_age[c] + 1;
        if (req_age[c] == 0) begin
          n_req[c]++;
          if (cfg_write) seen_data.push_back(ts_bus);
        end
        if (req_age[c] == 2) begin
          cfg_done[c]  <= 1'b1;
          cfg_rdata[c] <= 12'hA00 | 12'(c);
        end
      end else req_age[c] <= 0;
    end
    f = {sh[37:0], ser_out};
    sh <= f;
    k  <= (k == 19) ? 0 : k + 1;
    if (k == 19 && f[39:36] != HDR_IDLE) frames.push_back(f);
  end

  task automatic send_cmd(cfg_op_e op, int c, logic [7:0] a, logic [11:0] d);
    logic [31:0] v;
    v = {op, 2'(c), a, 8'h00, d};
    for (int b = 31; b >= 0; b--) begin
      @(negedge clk);
      si_en = 1'b1;
      si_data = v[b];
    end
    @(negedge clk);
    si_en = 1'b0;
    repeat (10) @(negedge clk);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hit_t h;
    logic [11:0] t0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(1, run, 0);
    send_cmd(OP_CFG_WR, 2, 8'h85, 12'h3C7);
    check(2, n_req[2], 1);
    check(3, seen_data.size(), 1);
    if (seen_data.size() > 0) check(4, seen_data[0], 12'h3C7);
    check(5, cfg_addr, 8'h85);
    send_cmd(OP_CFG_RD, 3, 8'h11, 12'h000);
    repeat (50) @(negedge clk);
    check(6, frames.size(), 1);
    if (frames.size() > 0) check(7, frames.pop_front(), {HDR_CFG, 2'd3, 8'h11, 12'h000, 12'hA03, 2'b00});
    // start data taking
    send_cmd(OP_MODE, 0, 8'h00, 12'h001);
    check(8, run, 1);
    // si_en fell 10 cycles ago; the command is decoded one cycle later and run rises the
    // cycle after, with the count at 0, so 8 counts have elapsed
    check(9, ts_bus, 12'(8) ^ (12'(8) >> 1));
    @(negedge clk);
    check(10, ts_bus, 12'(9) ^ (12'(9) >> 1));
    // writes are refused while taking data
    send_cmd(OP_CFG_WR, 1, 8'h01, 12'h555);
    check(11, n_req[1], 0);
    // hits in all four FIFOs
    for (int c = 0; c < 4; c++)
      for (int i = 0; i < 5; i++) begin
        h.addr = 8'(c * 16 + i);
        h.le = 12'($urandom);
        h.te = 12'($urandom);
        fq[c].push_back(h);
      end
    begin
      hit_t all[4][$];
      for (int c = 0; c < 4; c++) all[c] = fq[c];
      repeat (20 * 25) @(negedge clk);
      check(12, frames.size(), 20);
      for (int n = 0; n < 20 && n < frames.size(); n++) begin
        check(13, frames[n][39:36], HDR_DATA);
        check(14, frames[n][35:34], n % 4);             // round robin
        check(15, frames[n][33:2], all[n % 4][n / 4]);
      end
    end
    check(16, cmd_err, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
