// tb_pixel_cell: one pixel with a driven time stamp bus. Checks that the stamps at the
// comparator's rising and falling edges are stored, that busy is raised only when both
// are stored, that the pixel drives the buses only when selected by the chain and read,
// that rd_ack clears it, that a pulse while waiting for readout is ignored, that a
// lower-priority position (busy_in high) keeps it off the bus, and that the configuration
// register is written through te_reg, read back, and that its mask bit silences the pixel.
module tb_pixel_cell;
  import topix_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, comp = 1'b0;
  logic [11:0] ts_bus = '0;
  logic busy_in = 1'b0, busy_out, rd = 1'b0, rd_ack = 1'b0, drv;
  logic [7:0] addr_o;
  logic [11:0] le_o, te_o, cfg_q;
  logic cfg_sel = 1'b0, cfg_wr = 1'b0, cfg_load = 1'b0, cfg_rd = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pixel_cell #(.ADDR(8'hA5), .HAMMING(1'b1)) dut (.*);

  function automatic void check(int id, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL check %0d: got %h expected %h", id, got, exp);
    end
  endfunction

  // the bus counts from 0x100 while run is high
  always @(posedge clk) ts_bus <= run ? ts_bus + 1 : ts_bus;

  task automatic hit(int wait_c, int len, output logic [11:0] le, output logic [11:0] te);
    repeat (wait_c) @(negedge clk);
    comp = 1'b1;
    le = ts_bus;
    repeat (len) @(negedge clk);
    comp = 1'b0;
    te = ts_bus;
  endtask

  task automatic cfg_write(logic [11:0] v);
    @(negedge clk);
    ts_bus = v;
    cfg_sel = 1'b1;
    cfg_wr = 1'b1;
    @(negedge clk);
    cfg_wr = 1'b0;
    cfg_load = 1'b1;
    @(negedge clk);
    cfg_load = 1'b0;
    cfg_sel = 1'b0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] le, te, le2, te2;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // configuration: write and read back
    cfg_write(12'hABC);
    check(1, cfg_q, 12'hABC);
    cfg_sel = 1'b1;
    cfg_rd = 1'b1;
    #1 check(2, drv, 1);
    check(3, te_o, 12'hABC);
    check(4, addr_o, 8'hA5);
    @(negedge clk);
    cfg_rd = 1'b0;
    cfg_sel = 1'b0;
    cfg_write(12'h000);
    check(5, cfg_q, 0);
    // data taking
    ts_bus = 12'h100;
    run = 1'b1;
    for (int n = 0; n < 20; n++) begin
      hit($urandom_range(1, 5), $urandom_range(1, 40), le, te);
      check(6, busy_out, 0);       // trailing edge not yet seen at this negedge
      @(negedge clk);
      check(7, busy_out, 1);
      check(8, drv, 0);
      // a second pulse while waiting is ignored
      hit(1, 3, le2, te2);
      @(negedge clk);
      // a higher-priority pixel busy: stays off the bus
      busy_in = 1'b1;
      rd = 1'b1;
      #1 check(9, drv, 0);
      busy_in = 1'b0;
      #1 check(10, drv, 1);
      check(11, le_o, le);
      check(12, te_o, te);
      check(13, addr_o, 8'hA5);
      @(negedge clk);
      rd_ack = 1'b1;
      @(negedge clk);
      rd = 1'b0;
      rd_ack = 1'b0;
      check(14, busy_out, 0);
      check(15, drv, 0);
    end
    // masked pixel ignores the comparator
    run = 1'b0;
    cfg_write(12'h001);
    run = 1'b1;
    hit(2, 5, le, te);
    repeat (3) @(negedge clk);
    check(16, busy_out, 0);
    busy_in = 1'b1;
    #1 check(17, busy_out, 1);     // chain passes through a masked pixel
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
