// convert_gen: WIB translation of received commands into front-end signals.
//
// Each received command word that carries CONVERT starts one period of the
// 2 MHz CONVERT clock sent to the FEMBs: the clock rises in the cycle after
// cmd_valid and stays high HIGH_CYCLES cycles, then low until the next
// CONVERT. The rising edge is the digitize command of the ADCs, so when no
// CONVERT is received no edge is produced and the front end stays idle.
// CALIBRATE, SYNC and COLDATA_RESET become PULSE_CYCLES-long pulses.
// The block also keeps the counts the WIB puts in its frame header: a 16-bit
// CONVERT count (cleared by SYNC, the SYNC word's own CONVERT counting as 1)
// and a 24-bit count of SYNC commands ("reset count"). convert_evt and
// sync_evt are single-cycle strobes for the data-link clock domain.
// The 2 MHz clock, the command names and the counter widths follow the
// specification; pulse widths, duty cycle and counting rules are this
// design's choices.
module convert_gen
  import pdts_pkg::*;
#(
  parameter int unsigned HIGH_CYCLES  = 25,  // half of 500 ns at 100 MHz
  parameter int unsigned PULSE_CYCLES = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         cmd_valid,
  input  cmd_payload_t cmd,
  output logic         convert_clk,
  output logic         calibrate,
  output logic         sync,
  output logic         coldata_reset,
  output logic         convert_evt,
  output logic         sync_evt,
  output logic [15:0]  convert_count,
  output logic [23:0]  reset_count
);
  logic [$clog2(HIGH_CYCLES+1)-1:0] hi_cnt;
  logic [$clog2(PULSE_CYCLES+1)-1:0] cal_cnt, syn_cnt, rst_cnt;

  assign calibrate     = (cal_cnt != 0);
  assign sync          = (syn_cnt != 0);
  assign coldata_reset = (rst_cnt != 0);
  assign convert_clk   = (hi_cnt != 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      hi_cnt <= '0; cal_cnt <= '0; syn_cnt <= '0; rst_cnt <= '0;
      convert_count <= '0; reset_count <= '0;
      convert_evt <= 1'b0; sync_evt <= 1'b0;
    end else begin
      convert_evt <= cmd_valid && cmd.convert;
      sync_evt    <= cmd_valid && cmd.sync;
      if (hi_cnt != 0)  hi_cnt  <= hi_cnt - 1'b1;
      if (cal_cnt != 0) cal_cnt <= cal_cnt - 1'b1;
      if (syn_cnt != 0) syn_cnt <= syn_cnt - 1'b1;
      if (rst_cnt != 0) rst_cnt <= rst_cnt - 1'b1;
      if (cmd_valid) begin
        if (cmd.convert)       hi_cnt  <= HIGH_CYCLES[$bits(hi_cnt)-1:0];
        if (cmd.calibrate)     cal_cnt <= PULSE_CYCLES[$bits(cal_cnt)-1:0];
        if (cmd.sync)          syn_cnt <= PULSE_CYCLES[$bits(syn_cnt)-1:0];
        if (cmd.coldata_reset) rst_cnt <= PULSE_CYCLES[$bits(rst_cnt)-1:0];
        if (cmd.sync) begin
          convert_count <= {15'd0, cmd.convert};
          reset_count   <= reset_count + 24'd1;
        end else if (cmd.convert) begin
          convert_count <= convert_count + 16'd1;
        end
      end
    end
  end
endmodule
