// tb_serializer: offers random 40-bit frames with random gaps, deserialises the two-bit
// output and checks that the frames come out in order, MSB first, one every 20 cycles,
// with idle frames filling the gaps.
module tb_serializer;
  import topix_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [39:0] frame = '0;
  logic frame_valid = 1'b0, frame_ready;
  logic [1:0] ser_out;
  logic [39:0] sent[$], sh;
  int checks = 0, failures = 0, k = 0, n_idle = 0, n_data = 0;

  always #5 clk = ~clk;

  serializer dut (.clk, .rst_n, .frame, .frame_valid, .frame_ready, .ser_out);

  function automatic void check(int id, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL check %0d: got %h expected %h", id, got, exp);
    end
  endfunction

  // frame source: a new frame is offered whenever the last one was taken
  always @(posedge clk) if (rst_n) begin
    if (frame_valid && frame_ready) begin
      sent.push_back(frame);
      frame_valid <= 1'b0;
    end else if (!frame_valid && $urandom_range(0, 99) < 4) begin
      frame       <= {HDR_DATA, 36'($urandom) ^ (36'($urandom) << 20)};
      frame_valid <= 1'b1;
    end
  end

  // receiver, aligned to the first cycle after reset
  always @(posedge clk) if (rst_n) begin
    logic [39:0] f;
    f = {sh[37:0], ser_out};
    sh <= f;
    k  <= (k == 19) ? 0 : k + 1;
    if (k == 19) begin
      if (f[39:36] == HDR_IDLE) begin
        n_idle++;
        check(1, f, {HDR_IDLE, 36'd0});
      end else begin
        n_data++;
        checks++;
        if (sent.size() == 0) begin
          failures++;
          $display("FAIL frame received that was not sent");
        end else check(2, f, sent.pop_front());
      end
    end
  end

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
    repeat (20 * 400) @(negedge clk);
    check(3, n_idle > 0, 1);
    check(4, n_data > 10, 1);
    check(5, n_idle + n_data, 400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
