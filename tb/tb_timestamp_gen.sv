// tb_timestamp_gen: the 12-bit time stamp must count once per clock, wrap from 4095 to 0,
// be Gray coded on the bus with exactly one bit changing per step, and restart at 0 on clr.
module tb_timestamp_gen;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic [11:0] ts_bin, ts_gray, prev_gray, g;
  int checks = 0, failures = 0, n_wrap = 0;

  always #5 clk = ~clk;

  timestamp_gen #(.W(12)) dut (.clk, .rst_n, .clr, .ts_bin, .ts_gray);

  function automatic void check(int id, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL check %0d: got %h expected %h", id, got, exp);
    end
  endfunction

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(1, ts_gray, 0);
    prev_gray = ts_gray;
    for (int n = 1; n <= 5000; n++) begin
      @(negedge clk);
      check(2, ts_bin, n % 4096);
      g = 12'(n % 4096);
      g = g ^ (g >> 1);
      check(3, ts_gray, g);
      check(4, $countones(ts_gray ^ prev_gray), 1);
      if (ts_bin == 0) n_wrap++;
      prev_gray = ts_gray;
    end
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    check(5, ts_bin, 0);
    check(6, ts_gray, 0);
    @(negedge clk);
    check(7, ts_bin, 1);
    check(8, n_wrap, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
