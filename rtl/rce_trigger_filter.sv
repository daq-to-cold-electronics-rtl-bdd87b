// rce_trigger_filter: partition selection of triggers at an RCE.
//
// Several runs (partitions) can share the one timing system: CONVERT is
// common to all, but each trigger carries a 2-bit partition number. The RCE
// holds the partition it runs in, in a configuration register written by
// cfg_we/cfg_part, and answers only triggers of that partition (trig_out, one
// cycle, with trig_calib). Triggers of other partitions are counted as
// ignored. A cleared cfg_enable ignores all triggers. The partition register
// and the 2-bit identifier follow the specification; the enable bit and the
// counters are this design's choices.
module rce_trigger_filter
  import pdts_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         cfg_we,
  input  logic [1:0]   cfg_part,
  input  logic         cfg_enable,
  input  logic         cmd_valid,
  input  cmd_payload_t cmd,
  output logic [1:0]   part_reg,
  output logic         trig_out,
  output logic         trig_calib,
  output logic [31:0]  n_accepted,
  output logic [31:0]  n_ignored
);
  logic en_reg;

  always_ff @(posedge clk) begin
    if (rst) begin
      part_reg <= '0; en_reg <= 1'b0;
      trig_out <= 1'b0; trig_calib <= 1'b0;
      n_accepted <= '0; n_ignored <= '0;
    end else begin
      if (cfg_we) begin
        part_reg <= cfg_part;
        en_reg   <= cfg_enable;
      end
      trig_out <= 1'b0;
      if (cmd_valid && cmd.trig) begin
        if (en_reg && cmd.trig_part == part_reg) begin
          trig_out   <= 1'b1;
          trig_calib <= cmd.trig_calib;
          n_accepted <= n_accepted + 32'd1;
        end else begin
          n_ignored <= n_ignored + 32'd1;
        end
      end
    end
  end
endmodule
