// seu_cfg_reg: single-event-upset protected register for a pixel configuration word.
//
// The ToPiX v4 matrix protects its pixel registers in two ways: the first half of the
// matrix triplicates them (triple modular redundancy, TMR), the second half stores them
// with a Hamming code. HAMMING selects the scheme. With HAMMING = 0 three copies are kept
// and q is their bitwise majority; with HAMMING = 1 a Hamming(17,12) code word is kept and
// q is its single-error-corrected decode. In both schemes the register rewrites itself
// with the corrected value on every clock edge when it is not being loaded, so a single
// upset is scrubbed one cycle after it happens instead of accumulating with a second one
// (the scrubbing is this design's choice). The Hamming scheme is written for W = 12.
//
// Interface: load high at a rising clk edge stores d; q is combinational from the stored
// bits. rst_n (asynchronous, active low) clears the register to all zeros.
module seu_cfg_reg
  import topix_pkg::*;
#(
  parameter int unsigned W       = CFG_W,
  parameter bit          HAMMING = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  if (HAMMING) begin : g_ham
    logic [16:0] cw_q;
    logic [11:0] dec;
    initial assert (W == 12) else $error("seu_cfg_reg: Hamming scheme needs W = 12");
    always_comb dec = ham_decode(cw_q);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)    cw_q <= ham_encode('0);
      else if (load) cw_q <= ham_encode(12'(d));
      else           cw_q <= ham_encode(dec);
    end
    assign q = W'(dec);
  end else begin : g_tmr
    logic [W-1:0] a_q, b_q, c_q, vote;
    always_comb vote = (a_q & b_q) | (a_q & c_q) | (b_q & c_q);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        a_q <= '0;
        b_q <= '0;
        c_q <= '0;
      end else begin
        a_q <= load ? d : vote;
        b_q <= load ? d : vote;
        c_q <= load ? d : vote;
      end
    end
    assign q = vote;
  end

endmodule
