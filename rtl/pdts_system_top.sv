// pdts_system_top: timing distribution and WIB-to-RCE data path of one
// ProtoDUNE TPC readout slice.
//
// Timing side (clk_tim, the 100 MHz half-cell clock of the 50 MHz
// biphase-mark carrier): the timing master (with its trigger unit) drives one
// downstream stream that is fanned out unchanged to every readout element;
// here a WIB endpoint and an RCE endpoint receive it. Their return-path
// transmitters share one return line (wired OR of the enabled drivers), which
// the master decodes to check the endpoints' CONVERT counts. The WIB turns
// the received commands into the 2 MHz CONVERT clock and command pulses for
// its FEMBs (convert_gen) and derives its IP address from crate and slot. The
// RCE keeps only the triggers of its own partition.
//
// Data side (clk_link, 250 MHz word clock of the 5 Gbps links): each of the
// N_LINKS FEMB links of the WIB has a framer (buffer, header, CRC-32,
// 8b/10b) that sends one frame per CONVERT; CONVERT and SYNC strobes and the
// counts in the header cross from the timing clock with cdc_pulse. The
// optical fibre is modelled as a wire with an error mask (fibre_err_mask,
// XORed into the code words, zero in normal use); at the far end each link
// has an RCE receiver with error counters.
//
// Clock/data recovery, fan-out buffers, backplane and transceivers have no
// logic function and are wires here: the endpoints run on clk_tim, which
// stands for their recovered clock.
module pdts_system_top
  import pdts_pkg::*;
#(
  parameter int unsigned N_LINKS  = 4,
  parameter int unsigned NBUSY    = 8,
  parameter logic [7:0]  WIB_ADDR = 8'h01,
  parameter logic [7:0]  RCE_ADDR = 8'h02
) (
  input  logic                    clk_tim,
  input  logic                    rst_tim,
  input  logic                    clk_link,
  input  logic                    rst_link,
  // timing master: software control
  input  logic                    convert_en,
  input  logic                    sync_req,
  input  logic                    calib_req,
  input  logic                    reset_req,
  input  logic                    poll_req,
  input  logic [7:0]              poll_addr,
  input  logic                    set_enable,
  input  logic                    calib_en,
  input  logic [15:0]             veto_cycles,
  input  logic [23:0]             calib_period,
  input  logic [15:0]             max_outstanding,
  input  logic [1:0]              beam_part,
  input  logic [1:0]              calib_part,
  // accelerator, beam line, backpressure
  input  logic                    spill_start,
  input  logic                    spill_end,
  input  logic                    beam_trig,
  input  logic [NBUSY-1:0]        rce_busy,
  input  logic                    evt_done,
  // master status
  output logic [15:0]             master_convert_count,
  output logic [15:0]             sync_ok,
  output logic [15:0]             sync_err,
  output logic [15:0]             ret_words,
  output logic                    in_spill,
  output logic                    set_eff,
  output logic [31:0]             n_trig_sent,
  output logic [31:0]             n_vetoed,
  output logic [31:0]             n_inhibited,
  output logic [31:0]             n_calib,
  // WIB
  input  logic [4:0]              wib_crate,
  input  logic [2:0]              wib_slot,
  input  logic                    test_mode,
  output logic [31:0]             wib_ip,
  output logic                    wib_ip_valid,
  output logic                    wib_locked,
  output logic                    wib_aligned,
  output logic                    femb_clk50,
  output logic                    femb_convert_clk,
  output logic                    femb_calibrate,
  output logic                    femb_sync,
  output logic                    femb_reset,
  output logic [15:0]             wib_convert_count,
  input  logic [N_LINKS-1:0]      cd_valid,
  input  logic [N_LINKS-1:0]      cd_sof,
  input  logic [N_LINKS-1:0][15:0] cd_data,
  output logic [N_LINKS-1:0][19:0] link_code,
  output logic [N_LINKS-1:0][15:0] wib_err_count,
  output logic [N_LINKS-1:0][31:0] wib_frames_sent,
  input  logic [N_LINKS-1:0][19:0] fibre_err_mask,
  // RCE
  input  logic                    rce_cfg_we,
  input  logic [1:0]              rce_cfg_part,
  input  logic                    rce_cfg_enable,
  output logic                    rce_trig,
  output logic                    rce_trig_calib,
  output logic [31:0]             rce_trig_accepted,
  output logic [31:0]             rce_trig_ignored,
  output logic [N_LINKS-1:0]      rx_valid,
  output logic [N_LINKS-1:0][6:0] rx_row,
  output logic [N_LINKS-1:0][15:0] rx_word,
  output logic [N_LINKS-1:0][31:0] rx_good_frames,
  output logic [N_LINKS-1:0][15:0] rx_crc_errors,
  output logic [N_LINKS-1:0][15:0] rx_code_errors,
  output logic [N_LINKS-1:0][15:0] rx_convert_gaps
);
  // ---------------- timing distribution ----------------
  logic tim_line, tim_oe, ret_line;
  logic wib_ret, wib_ret_oe, rce_ret, rce_ret_oe;
  logic wib_cmd_valid, rce_cmd_valid;
  cmd_payload_t wib_cmd, rce_cmd;
  logic convert_evt_t, sync_evt_t;
  logic [23:0] reset_count;

  timing_master #(.NBUSY(NBUSY)) u_master (
    .clk(clk_tim), .rst(rst_tim),
    .convert_en, .sync_req, .calib_req, .reset_req, .poll_req, .poll_addr,
    .spill_start, .spill_end, .beam_trig, .set_enable, .calib_en, .veto_cycles,
    .calib_period, .max_outstanding, .beam_part, .calib_part,
    .busy_in(rce_busy), .evt_done,
    .line(tim_line), .line_oe(tim_oe), .word_load(), .ret_line,
    .convert_count(master_convert_count), .poll_busy(), .ret_words, .sync_ok,
    .sync_err, .last_echo(), .in_spill, .set_eff, .outstanding(),
    .n_trig_sent, .n_vetoed, .n_inhibited, .n_lost(), .n_calib);

  // fan-out of the downstream stream; shared return path
  logic dn_line;
  assign dn_line  = tim_line & tim_oe;
  assign ret_line = (wib_ret & wib_ret_oe) | (rce_ret & rce_ret_oe);

  timing_endpoint u_wib_ep (
    .clk(clk_tim), .rst(rst_tim), .line_in(dn_line), .my_addr(WIB_ADDR),
    .locked(wib_locked), .aligned(wib_aligned), .clk50(femb_clk50),
    .cmd_valid(wib_cmd_valid), .cmd(wib_cmd), .convert_count(), .viol_count(),
    .word_err_count(), .slip_count(), .ret_line(wib_ret), .ret_oe(wib_ret_oe));

  timing_endpoint u_rce_ep (
    .clk(clk_tim), .rst(rst_tim), .line_in(dn_line), .my_addr(RCE_ADDR),
    .locked(), .aligned(), .clk50(),
    .cmd_valid(rce_cmd_valid), .cmd(rce_cmd), .convert_count(), .viol_count(),
    .word_err_count(), .slip_count(), .ret_line(rce_ret), .ret_oe(rce_ret_oe));

  convert_gen u_conv (
    .clk(clk_tim), .rst(rst_tim), .cmd_valid(wib_cmd_valid), .cmd(wib_cmd),
    .convert_clk(femb_convert_clk), .calibrate(femb_calibrate), .sync(femb_sync),
    .coldata_reset(femb_reset), .convert_evt(convert_evt_t), .sync_evt(sync_evt_t),
    .convert_count(wib_convert_count), .reset_count);

  wib_ip_addr u_ip (
    .clk(clk_tim), .rst(rst_tim), .crate({3'd0, wib_crate}), .slot(wib_slot),
    .ip(wib_ip), .ip_valid(wib_ip_valid));

  rce_trigger_filter u_tfilt (
    .clk(clk_tim), .rst(rst_tim), .cfg_we(rce_cfg_we), .cfg_part(rce_cfg_part),
    .cfg_enable(rce_cfg_enable), .cmd_valid(rce_cmd_valid), .cmd(rce_cmd),
    .part_reg(), .trig_out(rce_trig), .trig_calib(rce_trig_calib),
    .n_accepted(rce_trig_accepted), .n_ignored(rce_trig_ignored));

  // ---------------- data links ----------------
  logic convert_evt_l, sync_evt_l;

  cdc_pulse u_cdc_conv (.src_clk(clk_tim), .src_rst(rst_tim), .src_pulse(convert_evt_t),
                        .dst_clk(clk_link), .dst_rst(rst_link), .dst_pulse(convert_evt_l));
  cdc_pulse u_cdc_sync (.src_clk(clk_tim), .src_rst(rst_tim), .src_pulse(sync_evt_t),
                        .dst_clk(clk_link), .dst_rst(rst_link), .dst_pulse(sync_evt_l));

  for (genvar i = 0; i < N_LINKS; i++) begin : g_link
    wib_frame_tx u_tx (
      .clk(clk_link), .rst(rst_link), .convert_evt(convert_evt_l), .sync_evt(sync_evt_l),
      .convert_count(wib_convert_count), .reset_count, .crate(wib_crate), .slot(wib_slot),
      .link(2'(i)), .test_mode, .cd_valid(cd_valid[i]), .cd_sof(cd_sof[i]),
      .cd_data(cd_data[i]), .link_code(link_code[i]), .tx_word(), .tx_k(), .in_frame(),
      .frames_sent(wib_frames_sent[i]), .err_count(wib_err_count[i]), .missing_count(),
      .overrun_count(), .fifo_overflow());

    rce_frame_rx u_rx (
      .clk(clk_link), .rst(rst_link), .link_code(link_code[i] ^ fibre_err_mask[i]),
      .rx_valid(rx_valid[i]), .rx_row(rx_row[i]), .rx_word(rx_word[i]), .frame_ok(),
      .good_frames(rx_good_frames[i]), .crc_errors(rx_crc_errors[i]), .trunc_frames(),
      .code_errors(rx_code_errors[i]), .disp_errors(), .idle_words(),
      .convert_gaps(rx_convert_gaps[i]), .last_convert(), .last_timestamp(),
      .last_err_bits());
  end
endmodule
