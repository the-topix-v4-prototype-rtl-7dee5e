// tb_column_controller: the double column is replaced by a model holding queues of
// pending hits per column, which drives the Gray-coded bus for the front hit while rd is
// high and drops it on rd_ack. Checks: every hit reaches the FIFO once, in binary, with
// the left column served first; rd lasts READ_CYCLES cycles and hits follow every
// READ_CYCLES+1 cycles; no read starts while the FIFO is full (stall); configuration
// writes give cfg_wr then cfg_load, reads give cfg_rd and return the data bus; and a
// single flipped bit of the protected state register is corrected.
module tb_column_controller;
  import topix_pkg::*;
  localparam int RC = 2;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b1;
  logic [1:0] busy, rd;
  logic rd_ack, cfg_wr, cfg_load, cfg_rd, fifo_wr, fifo_full = 1'b0;
  logic [7:0] bus_addr, cfg_addr, cfg_addr_i = '0;
  logic [11:0] bus_le, bus_te, cfg_rdata;
  hit_t fifo_wdata;
  logic cfg_req = 1'b0, cfg_write = 1'b0, cfg_done;
  hit_t q[2][$], got[$], exp_order[$];
  int checks = 0, failures = 0, n_stall = 0, rd_len = 0, last_wr = -1;
  longint cyc = 0;
  logic [11:0] cfg_bus = 12'h000;
  bit just_wrote = 1'b0;

  always #5 clk = ~clk;

  column_controller #(.READ_CYCLES(RC)) dut (.*);

  function automatic void check(int id, logic [63:0] g, logic [63:0] exp);
    checks++;
    if (g !== exp) begin
      failures++;
      $display("FAIL check %0d: got %h expected %h", id, g, exp);
    end
  endfunction

  function automatic logic [11:0] gray(logic [11:0] b);
    return b ^ (b >> 1);
  endfunction

  // double column model
  always_comb begin
    busy[0] = q[0].size() > 0;
    busy[1] = q[1].size() > 0;
    bus_addr = '0;
    bus_le = '0;
    bus_te = cfg_rd ? cfg_bus : 12'h000;
    for (int s = 0; s < 2; s++) if (rd[s] && q[s].size() > 0) begin
      bus_addr = q[s][0].addr;
      bus_le = gray(q[s][0].le);
      bus_te = gray(q[s][0].te);
    end
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (fifo_full && |busy && !(|rd)) n_stall++;
    just_wrote <= fifo_wr;
    if (|rd) rd_len <= rd_len + 1;
    if (fifo_wr) begin
      checks++;
      if (fifo_full) begin failures++; $display("FAIL write while full"); end
      got.push_back(fifo_wdata);
      check(20, rd_len + 1, RC);
      if (last_wr >= 0 && |busy) check(21, cyc - last_wr >= RC + 1, 1);
      last_wr <= int'(cyc);
    end
    if (rd_ack) begin
      rd_len <= 0;
      for (int s = 0; s < 2; s++) if (rd[s]) void'(q[s].pop_front());
    end
  end

  initial begin
    #500000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hit_t h;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // configuration write
    @(negedge clk);
    cfg_addr_i = 8'h42;
    cfg_write = 1'b1;
    cfg_req = 1'b1;
    @(negedge clk);
    check(1, {cfg_wr, cfg_load, cfg_done}, 3'b100);
    check(2, cfg_addr, 8'h42);
    @(negedge clk);
    check(3, {cfg_wr, cfg_load, cfg_done}, 3'b011);
    cfg_req = 1'b0;
    @(negedge clk);
    check(4, {cfg_wr, cfg_load, cfg_rd}, 3'b000);
    // configuration read
    cfg_bus = 12'h9E1;
    cfg_write = 1'b0;
    cfg_req = 1'b1;
    @(negedge clk);
    check(5, {cfg_rd, cfg_done}, 2'b10);
    @(negedge clk);
    check(6, {cfg_rd, cfg_done}, 2'b11);
    check(7, cfg_rdata, 12'h9E1);
    cfg_req = 1'b0;
    @(negedge clk);
    // readout of batches, left column first
    for (int b = 0; b < 8; b++) begin
      exp_order = {};
      for (int s = 0; s < 2; s++) begin
        int n;
        n = $urandom_range(0, 12);
        for (int k = 0; k < n; k++) begin
          h.addr = 8'((s << 7) | k);
          h.le = 12'($urandom);
          h.te = 12'($urandom);
          q[s].push_back(h);
        end
      end
      foreach (q[0][k]) exp_order.push_back(q[0][k]);
      foreach (q[1][k]) exp_order.push_back(q[1][k]);
      while (q[0].size() + q[1].size() > 0) begin
        // like a real FIFO, full can only rise right after a write, and falls when read
        if (just_wrote && b % 2 == 1 && $urandom_range(0, 99) < 60) fifo_full = 1'b1;
        else if ($urandom_range(0, 99) < 10) fifo_full = 1'b0;
        @(negedge clk);
      end
      fifo_full = 1'b0;
      repeat (4) @(negedge clk);
      check(8, got.size(), exp_order.size());
      foreach (exp_order[k]) if (k < got.size()) check(9, got[k], exp_order[k]);
      got = {};
      last_wr = -1;
    end
    // upset of the state register: flip one bit while a read is in progress
    h.addr = 8'h07; h.le = 12'h123; h.te = 12'h456;
    q[1].push_back(h);
    @(negedge clk);
    check(10, rd, 2'b10);
    force dut.state_q = dut.state_q ^ 6'b000100;
    #1 check(11, rd, 2'b10);
    @(negedge clk);
    release dut.state_q;
    repeat (4) @(negedge clk);
    check(12, got.size(), 1);
    if (got.size() > 0) check(13, got[0], h);
    check(14, n_stall > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
