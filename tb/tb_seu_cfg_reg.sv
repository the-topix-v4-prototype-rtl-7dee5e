// tb_seu_cfg_reg: checks both protection schemes of seu_cfg_reg. Random words are loaded
// and read back; then single bits of the stored copies (TMR) or of the stored code word
// (Hamming) are flipped with force/release, and the output must stay correct and the
// stored bits must be repaired at the next clock edge.
module tb_seu_cfg_reg;
  import topix_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load;
  logic [11:0] d, q_tmr, q_ham;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  seu_cfg_reg #(.W(12), .HAMMING(1'b0)) u_tmr (.clk, .rst_n, .load, .d, .q(q_tmr));
  seu_cfg_reg #(.W(12), .HAMMING(1'b1)) u_ham (.clk, .rst_n, .load, .d, .q(q_ham));

  function automatic void check(int id, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL check %0d: got %h expected %h", id, got, exp);
    end
  endfunction

  // Reference Hamming(17,12) encoder written independently of the package: data bits fill
  // the non-power-of-two positions 3,5,6,7,9..15,17 in order.
  function automatic logic [16:0] ref_encode(logic [11:0] v);
    logic [17:1] c;
    c = {v[11], 1'b0, v[10:4], 1'b0, v[3:1], 1'b0, v[0], 2'b00};
    c[1]  = c[3]^c[5]^c[7]^c[9]^c[11]^c[13]^c[15]^c[17];
    c[2]  = c[3]^c[6]^c[7]^c[10]^c[11]^c[14]^c[15];
    c[4]  = c[5]^c[6]^c[7]^c[12]^c[13]^c[14]^c[15];
    c[8]  = c[9]^c[10]^c[11]^c[12]^c[13]^c[14]^c[15];
    c[16] = c[17];
    return c;
  endfunction

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] v;
    load = 1'b0;
    d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(1, q_tmr, 0);
    check(2, q_ham, 0);
    for (int i = 0; i < 20; i++) begin
      v = 12'($urandom);
      d = v;
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      d = ~v;
      @(negedge clk);
      check(3, q_tmr, v);
      check(4, q_ham, v);
      check(5, u_ham.g_ham.cw_q, ref_encode(v));
      // upset one copy of the triplicated register
      force u_tmr.g_tmr.b_q = u_tmr.g_tmr.b_q ^ (12'b1 << (i % 12));
      #1 check(6, q_tmr, v);
      release u_tmr.g_tmr.b_q;
      // upset one bit of the Hamming code word
      force u_ham.g_ham.cw_q = u_ham.g_ham.cw_q ^ (17'b1 << (i % 17));
      #1 check(7, q_ham, v);
      release u_ham.g_ham.cw_q;
      @(negedge clk);
      check(8, u_tmr.g_tmr.b_q, v);
      check(9, u_ham.g_ham.cw_q, ref_encode(v));
      check(10, q_tmr, v);
      check(11, q_ham, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
