// tb_double_column: a double column of 2x8 pixels (reduced from 2x128). Random pixels of
// both columns are hit; the testbench then reads each column the way the column
// controller does and checks that hits come out highest row first, with the right
// addresses and stamps, that busy[side] is the OR of its column, and that configuration
// writes reach only the addressed pixel.
module tb_double_column;
  import topix_pkg::*;
  localparam int R = 8;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [2*R-1:0] comp = '0;
  logic [11:0] ts_bus = '0;
  logic [1:0] busy, rd = '0;
  logic rd_ack = 1'b0;
  logic [7:0] bus_addr, cfg_addr = '0;
  logic [11:0] bus_le, bus_te;
  logic cfg_wr = 1'b0, cfg_load = 1'b0, cfg_rd = 1'b0;
  logic [2*R-1:0][11:0] pix_cfg;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  double_column #(.ROWS(R), .HAMMING(1'b0)) dut (.*);

  function automatic void check(int id, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL check %0d: got %h expected %h", id, got, exp);
    end
  endfunction

  always @(posedge clk) ts_bus <= run ? ts_bus + 1 : ts_bus;

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] le[2*R], te[2*R];
    bit          h[2*R];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // configuration of pixel side 1 row 3
    @(negedge clk);
    ts_bus = 12'h5C4;
    cfg_addr = 8'h83;
    cfg_wr = 1'b1;
    @(negedge clk);
    cfg_wr = 1'b0;
    cfg_load = 1'b1;
    @(negedge clk);
    cfg_load = 1'b0;
    for (int i = 0; i < 2 * R; i++) check(1, pix_cfg[i], (i == R + 3) ? 12'h5C4 : 12'h000);
    cfg_rd = 1'b1;
    #1 check(2, bus_te, 12'h5C4);
    check(3, bus_addr, 8'h83);
    @(negedge clk);
    cfg_rd = 1'b0;
    run = 1'b1;
    for (int round = 0; round < 10; round++) begin
      // hit a random subset, each with its own pulse length
      for (int i = 0; i < 2 * R; i++) h[i] = ($urandom_range(0, 1) == 1);
      for (int i = 0; i < 2 * R; i++) if (h[i]) begin
        comp[i] = 1'b1;
        le[i] = ts_bus;
      end
      for (int t = 1; t <= 2 * R; t++) begin
        @(negedge clk);
        for (int i = 0; i < 2 * R; i++) if (h[i] && comp[i] && (i % 5) + 1 == t) begin
          comp[i] = 1'b0;
          te[i] = ts_bus;
        end
      end
      for (int i = 0; i < 2 * R; i++) if (comp[i]) begin
        comp[i] = 1'b0;
        te[i] = ts_bus;
      end
      @(negedge clk);
      for (int s = 0; s < 2; s++) begin
        logic any;
        any = 1'b0;
        for (int r = 0; r < R; r++) any |= h[s*R+r];
        check(4, busy[s], any);
        for (int r = R - 1; r >= 0; r--) if (h[s*R+r]) begin
          rd[s] = 1'b1;
          #1 check(5, bus_addr, (s << 7) | r);
          check(6, bus_le, le[s*R+r]);
          check(7, bus_te, te[s*R+r]);
          rd_ack = 1'b1;
          @(negedge clk);
          rd = '0;
          rd_ack = 1'b0;
        end
        check(8, busy[s], 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
