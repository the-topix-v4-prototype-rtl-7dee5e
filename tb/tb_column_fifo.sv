// tb_column_fifo: random writes and reads against a queue model of the 32-word FIFO.
// Checks the data order, the count, full after 32 words and empty after draining.
module tb_column_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0, full, empty;
  logic [31:0] wr_data = '0, rd_data;
  logic [5:0] count;
  logic [31:0] model[$];
  int checks = 0, failures = 0, n_full = 0;

  always #5 clk = ~clk;

  column_fifo #(.DEPTH(32), .W(32)) dut (.clk, .rst_n, .wr_en, .wr_data, .full, .rd_en, .rd_data, .empty, .count);

  function automatic void check(int id, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL check %0d: got %h expected %h", id, got, exp);
    end
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(1, empty, 1);
    // fill completely
    for (int i = 0; i < 32; i++) begin
      wr_en = 1'b1;
      wr_data = $urandom;
      model.push_back(wr_data);
      @(negedge clk);
    end
    wr_en = 1'b0;
    check(2, full, 1);
    check(3, count, 32);
    // random traffic
    for (int t = 0; t < 3000; t++) begin
      if (full) n_full++;
      if (!empty) check(4, rd_data, model[0]);
      wr_en = ($urandom_range(0, 99) < (t < 1500 ? 55 : 40)) && !full;
      rd_en = ($urandom_range(0, 99) < 50) && !empty;
      wr_data = $urandom;
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      @(negedge clk);
      check(5, count, model.size());
      check(6, empty, model.size() == 0);
      check(7, full, model.size() == 32);
    end
    wr_en = 1'b0;
    while (!empty) begin
      check(8, rd_data, model.pop_front());
      rd_en = 1'b1;
      @(negedge clk);
    end
    rd_en = 1'b0;
    check(9, model.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
