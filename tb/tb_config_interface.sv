// tb_config_interface: sends random 32-bit commands MSB first and checks each is
// delivered once, intact, one cycle after si_en falls; a 31-bit and a 33-bit frame must
// be dropped and counted as errors.
module tb_config_interface;
  logic clk = 1'b0, rst_n = 1'b0, si_en = 1'b0, si_data = 1'b0;
  logic cmd_valid;
  logic [31:0] cmd;
  logic [7:0] err_count;
  logic [31:0] got[$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  config_interface #(.CMD_W(32)) dut (.clk, .rst_n, .si_en, .si_data, .cmd_valid, .cmd, .err_count);

  function automatic void check(int id, logic [31:0] g, logic [31:0] exp);
    checks++;
    if (g !== exp) begin
      failures++;
      $display("FAIL check %0d: got %h expected %h", id, g, exp);
    end
  endfunction

  always @(posedge clk) if (rst_n && cmd_valid) got.push_back(cmd);

  task automatic send(logic [63:0] v, int n);
    for (int b = n - 1; b >= 0; b--) begin
      @(negedge clk);
      si_en = 1'b1;
      si_data = v[b];
    end
    @(negedge clk);
    si_en = 1'b0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 30; i++) begin
      v = $urandom;
      send(64'(v), 32);
      check(1, got.size(), 1);
      if (got.size() > 0) check(2, got.pop_front(), v);
    end
    send(64'($urandom), 31);
    send(64'($urandom), 33);
    check(3, got.size(), 0);
    check(4, err_count, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
