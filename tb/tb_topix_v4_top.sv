// tb_topix_v4_top: end-to-end test of the full 640-pixel readout at its default sizes.
//
// The testbench plays the analog front ends (comparator pulses on comp) and the off-chip
// side (serial configuration commands, deserialisation of the 320 Mb/s output). It keeps
// its own time stamp count, started when data taking starts, and works out from the pulse
// edges it drives which leading and trailing edge stamps each hit must carry.
//   1. Configuration phase: writes configuration words into pixels of all four double
//      columns (some of them masked) and reads them back through the output link.
//   2. Upsets: flips one stored bit of a triplicated and of a Hamming-protected
//      configuration register; the read-back must still be correct.
//   3. Data taking: a burst of hits spread over the matrix (masked pixels must stay
//      silent), then a burst of 200 simultaneous hits in one long double column, which
//      fills its 32-word FIFO and stalls the column controller.
//   4. A configuration read-back during data taking.
// Every expected hit must arrive exactly once, with the right column, address and stamps.
// The mechanisms counted (and required to occur) are: configuration write, read-back,
// upset correction in both schemes, mode switch, masking, FIFO-full stall, round-robin
// interleaving of columns, time stamp wrap-around inside a hit, and idle frames.
module tb_topix_v4_top;
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

  // column 1 FIFO full while hits wait in the matrix
  always @(posedge clk) if (dut.fifo_full[1] && |dut.g_col[1].busy) n_stall++;

  initial begin
    #(HALF * 2 * 400000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cfg_pix[$];
    logic [CFG_W-1:0] cfg_val[int];
    int sel[$];
    int t0;

    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) @(negedge clk);

    // 1. configuration phase
    cfg_pix = '{3, 40, 64 + 7, 200, 319, 320, 500, 575, 600, 639};
    foreach (cfg_pix[k]) begin
      logic [CFG_W-1:0] v;
      v = CFG_W'($urandom) & ~CFG_W'(1);        // unmasked, random trim / test bits
      if (k % 3 == 1) v |= 1;                    // every third one masked
      cfg_val[cfg_pix[k]] = v;
      masked[cfg_pix[k]] = v[0];
      send_cmd(OP_CFG_WR, pix_col(cfg_pix[k]), pix_addr(cfg_pix[k]), v);
      n_cfg_wr++;
    end
    foreach (cfg_pix[k]) check(300 + k, pix_cfg[cfg_pix[k]], cfg_val[cfg_pix[k]]);
    foreach (cfg_pix[k]) read_back(cfg_pix[k], cfg_val[cfg_pix[k]]);

    // 2. single event upsets in a TMR column (pixel 200) and a Hamming column (pixel 500)
    force dut.g_col[1].u_dc.g_side[1].g_row[8].u_px.u_cfg.g_tmr.b_q =
          dut.g_col[1].u_dc.g_side[1].g_row[8].u_px.u_cfg.g_tmr.b_q ^ 12'h010;
    @(negedge clk);
    release dut.g_col[1].u_dc.g_side[1].g_row[8].u_px.u_cfg.g_tmr.b_q;
    force dut.g_col[2].u_dc.g_side[0].g_row[116].u_px.u_cfg.g_ham.cw_q =
          dut.g_col[2].u_dc.g_side[0].g_row[116].u_px.u_cfg.g_ham.cw_q ^ 17'h00400;
    @(negedge clk);
    release dut.g_col[2].u_dc.g_side[0].g_row[116].u_px.u_cfg.g_ham.cw_q;
    t0 = n_rb_ok;
    read_back(200, cfg_val[200]);
    if (n_rb_ok > t0) n_seu_tmr++;
    t0 = n_rb_ok;
    read_back(500, cfg_val[500]);
    if (n_rb_ok > t0) n_seu_ham++;

    // 3. data taking
    send_cmd(OP_MODE, 0, '0, 12'h001);
    if (dut.run) n_mode++;
    // burst A: 60 pixels across the matrix plus the configured ones
    for (int k = 0; k < 60; k++) sel.push_back((k * 97 + 5) % NPIX);
    foreach (cfg_pix[k]) sel.push_back(cfg_pix[k]);
    sel = sel.unique();
    foreach (sel[k]) begin
      start_c[sel[k]] = cyc + 5 + $urandom_range(0, 200);
      stop_c[sel[k]]  = start_c[sel[k]] + 1 + $urandom_range(0, 300);
    end
    repeat (700) @(negedge clk);
    wait (expect_hits.size() == 0);
    repeat (100) @(negedge clk);
    // burst B: 200 simultaneous hits in double column 1 (pixels 64..319), placed so that
    // their pulses straddle the 4095 -> 0 wrap of the time stamp
    wait (tcnt > 3900 || tcnt < 100);
    wait (tcnt > 3900);
    for (int i = 64; i < 264; i++) begin
      if (masked[i]) continue;
      start_c[i] = cyc + 150;
      stop_c[i]  = cyc + 300 + (i % 7);
    end
    repeat (400) @(negedge clk);
    wait (expect_hits.size() == 0);
    repeat (50) @(negedge clk);

    // 4. read-back during data taking
    read_back(575, cfg_val[575]);
    repeat (100) @(negedge clk);

    check(1, expect_hits.size(), 0);
    check(2, cmd_err, 0);
    $display("mechanisms: cfg_wr=%0d readback_ok=%0d seu_tmr=%0d seu_ham=%0d mode=%0d masked_pulses=%0d stall_cycles=%0d col_switches=%0d ts_wraps=%0d idle_frames=%0d data_frames=%0d",
             n_cfg_wr, n_rb_ok, n_seu_tmr, n_seu_ham, n_mode, n_masked_pulses, n_stall, n_switch, n_wrap, n_idle, n_data);
    if (n_cfg_wr == 0)        begin failures++; $display("FAIL no configuration write"); end
    if (n_rb_ok == 0)         begin failures++; $display("FAIL no read-back"); end
    if (n_seu_tmr == 0)       begin failures++; $display("FAIL no TMR upset corrected"); end
    if (n_seu_ham == 0)       begin failures++; $display("FAIL no Hamming upset corrected"); end
    if (n_mode == 0)          begin failures++; $display("FAIL no mode switch"); end
    if (n_masked_pulses == 0) begin failures++; $display("FAIL no masked pulse"); end
    if (n_stall == 0)         begin failures++; $display("FAIL no FIFO-full stall"); end
    if (n_switch == 0)        begin failures++; $display("FAIL no column interleaving"); end
    if (n_wrap == 0)          begin failures++; $display("FAIL no time stamp wrap in a hit"); end
    if (n_idle == 0)          begin failures++; $display("FAIL no idle frame"); end
    checks += 10;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
