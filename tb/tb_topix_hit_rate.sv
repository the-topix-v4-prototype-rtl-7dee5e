// tb_topix_hit_rate: the full 640-pixel design under random hits at the chip's maximum
// specified rate of 6.1e6 hits/cm2/s. The prototype covers 640 x (100 um)^2 = 0.064 cm2,
// so hits arrive at 3.9e5 /s, a probability of 2.44e-3 per 6.25 ns cycle for the chip,
// spread uniformly over the pixels. Pulse lengths correspond to 1-10 fC at 0.26 us/fC
// (42 to 416 cycles); that charge range is this testbench's choice. For 200000 cycles
// (1.25 ms) every hit must come out once with the right stamps, and the largest delay from
// trailing edge to output is reported; no FIFO may ever fill.
module tb_topix_hit_rate;
  import topix_pkg::*;

  localparam real HALF = 3.125;  // 160 MHz

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NPIX-1:0]            comp = '0;
  logic                       si_en = 1'b0, si_data = 1'b0;
  logic [1:0]                 ser_out;
  logic [NPIX-1:0][CFG_W-1:0] pix_cfg;
  logic [7:0]                 cmd_err;

  int checks = 0, failures = 0;
  longint cyc = 0;
  int unsigned tcnt = 0;

  always #(HALF) clk = ~clk;

  topix_v4_top dut (.clk, .rst_n, .comp, .si_en, .si_data, .ser_out, .pix_cfg, .cmd_err);

  function automatic void check(int id, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL check %0d: got %h expected %h", id, got, exp);
    end
  endfunction

  // ---- pixel numbering ----
  function automatic int pix_col(int i);
    int c = 0;
    while (c < NCOL - 1 && i >= int'(col_base(c + 1))) c++;
    return c;
  endfunction
  function automatic logic [ADDR_W-1:0] pix_addr(int i);
    int c = pix_col(i);
    int l = i - int'(col_base(c));
    int r = int'(col_rows(c));
    return ADDR_W'(((l / r) << 7) | (l % r));
  endfunction

  // ---- time stamp reference: 0 in the first cycle of data taking ----
  always @(posedge clk) begin
    cyc  <= cyc + 1;
    tcnt <= dut.run ? (tcnt + 1) % 4096 : 0;
  end

  // ---- comparator pulses ----
  longint start_c[NPIX], stop_c[NPIX];
  logic [TS_W-1:0] le_exp[NPIX], te_exp[NPIX];
  bit     masked[NPIX];
  int     expect_hits[int];    // key: pixel index, value: 1 while the hit is outstanding
  int     n_wrap = 0, n_masked_pulses = 0;

  initial for (int i = 0; i < NPIX; i++) begin
    start_c[i] = -1;
    stop_c[i]  = -1;
  end

  always @(negedge clk) begin
    for (int i = 0; i < NPIX; i++) begin
      logic v;
      v = (cyc >= start_c[i]) && (cyc < stop_c[i]);
      if (v && !comp[i]) le_exp[i] = TS_W'(tcnt);
      if (!v && comp[i]) begin
        te_exp[i] = TS_W'(tcnt);
        if (masked[i]) n_masked_pulses++;
        else begin
          expect_hits[i] = 1;
          if (te_exp[i] < le_exp[i]) n_wrap++;
        end
      end
      comp[i] = v;
    end
  end

  // ---- deserialiser ----
  logic [FRAME_W-1:0] rx_sh;
  int     rx_k = 0;
  int     n_idle = 0, n_data = 0, n_cfgf = 0, n_switch = 0, last_col = -1;
  logic [FRAME_W-1:0] cfg_frames[$];

  always @(posedge clk) if (rst_n) begin
    logic [FRAME_W-1:0] f;
    f = {rx_sh[FRAME_W-3:0], ser_out};
    rx_sh <= f;
    if (rx_k == FRAME_W / 2 - 1) begin
      rx_k <= 0;
      case (f[39:36])
        HDR_IDLE: n_idle++;
        HDR_CFG:  begin n_cfgf++; cfg_frames.push_back(f); end
        HDR_DATA: begin
          int c, i, found;
          logic [7:0] a;
          n_data++;
          c = int'(f[35:34]);
          a = f[33:26];
          if (last_col != -1 && c != last_col) n_switch++;
          last_col = c;
          found = -1;
          for (int j = int'(col_base(c)); j < int'(col_base(c)) + 2 * int'(col_rows(c)); j++)
            if (pix_addr(j) == a) found = j;
          checks++;
          if (found < 0 || !expect_hits.exists(found)) begin
            failures++;
            $display("FAIL unexpected hit col %0d addr %h", c, a);
          end else begin
            i = found;
            check(100, f[25:14], le_exp[i]);
            check(101, f[13:2], te_exp[i]);
            check(102, f[1:0], 0);
            expect_hits.delete(i);
          end
        end
        default: begin
          checks++;
          failures++;
          $display("FAIL bad frame header %b", f[39:36]);
        end
      endcase
    end else begin
      rx_k <= rx_k + 1;
    end
  end

  // ---- serial configuration ----
  task automatic send_cmd(cfg_op_e op, int c, logic [ADDR_W-1:0] a, logic [CFG_W-1:0] d);
    cfg_cmd_t cmd;
    cmd.op = op;
    cmd.col = 2'(c);
    cmd.addr = a;
    cmd.spare = '0;
    cmd.data = d;
    for (int b = $bits(cfg_cmd_t) - 1; b >= 0; b--) begin
      @(negedge clk);
      si_en = 1'b1;
      si_data = cmd[b];
    end
    @(negedge clk);
    si_en = 1'b0;
    repeat (8) @(negedge clk);
  endtask

  int n_rb_ok = 0, n_cfg_wr = 0, n_seu_tmr = 0, n_seu_ham = 0, n_stall = 0, n_mode = 0;

  task automatic read_back(int i, logic [CFG_W-1:0] exp);
    logic [FRAME_W-1:0] f;
    int c = pix_col(i);
    send_cmd(OP_CFG_RD, c, pix_addr(i), '0);
    repeat (60) @(negedge clk);
    checks++;
    if (cfg_frames.size() == 0) begin
      failures++;
      $display("FAIL no read-back frame for pixel %0d", i);
    end else begin
      f = cfg_frames.pop_front();
      check(200, f[35:34], c);
      check(201, f[33:26], pix_addr(i));
      check(202, f[13:2], exp);
      if (f[13:2] == exp) n_rb_ok++;
    end
  endtask

  always @(posedge clk) if (|dut.fifo_full) n_stall++;

  initial begin
    #(HALF * 2 * 400000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_hits = 0, n_offered = 0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);
    send_cmd(OP_MODE, 0, '0, 12'h001);
    for (int t = 0; t < 200000; t++) begin
      // 2.44e-3 per cycle: 244 in 100000
      if ($urandom_range(0, 99999) < 244) begin
        int i;
        i = $urandom_range(0, NPIX - 1);
        n_offered++;
        if (!expect_hits.exists(i) && !(cyc < stop_c[i] + 4)) begin
          start_c[i] = cyc + 1;
          stop_c[i]  = cyc + 1 + $urandom_range(42, 416);
          n_hits++;
        end
      end
      @(negedge clk);
    end
    repeat (1000) @(negedge clk);
    wait (expect_hits.size() == 0);
    repeat (100) @(negedge clk);
    check(1, expect_hits.size(), 0);
    check(2, n_data, n_hits);
    check(3, n_stall, 0);
    check(4, n_offered > 250, 1);
    $display("rate test: %0d hits offered, %0d driven in 200000 cycles, %0d data frames, %0d idle frames", n_offered, n_hits, n_data, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
