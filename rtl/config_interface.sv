// config_interface: serial configuration port of the chip control unit.
//
// Commands arrive on two lines sampled with the chip clock: si_en frames a command and
// si_data carries its bits, most significant first, one per clock cycle while si_en is
// high. When si_en falls after exactly CMD_W bits, cmd_valid pulses for one cycle with the
// command in cmd; a frame of any other length is dropped and counted in err_count. The
// ToPiX v4 chip has a dedicated serial interface for configuration; its line protocol and
// the command format (see topix_pkg::cfg_cmd_t) are this design's choices.
module config_interface
  import topix_pkg::*;
#(
  parameter int unsigned CMD_W = $bits(cfg_cmd_t)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             si_en,
  input  logic             si_data,
  output logic             cmd_valid,
  output logic [CMD_W-1:0] cmd,
  output logic [7:0]       err_count
);

  logic [CMD_W-1:0]         sh_q;
  logic [$clog2(CMD_W+2)-1:0] n_q;
  logic                     en_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh_q      <= '0;
      n_q       <= '0;
      en_q      <= 1'b0;
      cmd_valid <= 1'b0;
      cmd       <= '0;
      err_count <= '0;
    end else begin
      en_q      <= si_en;
      cmd_valid <= 1'b0;
      if (si_en) begin
        sh_q <= {sh_q[CMD_W-2:0], si_data};
        if (n_q <= ($bits(n_q))'(CMD_W)) n_q <= n_q + 1'b1;
      end else if (en_q) begin
        n_q <= '0;
        if (n_q == ($bits(n_q))'(CMD_W)) begin
          cmd_valid <= 1'b1;
          cmd       <= sh_q;
        end else if (err_count != '1) begin
          err_count <= err_count + 1'b1;
        end
      end
    end
  end

endmodule
