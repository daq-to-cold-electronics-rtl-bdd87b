// timing_master: master of the timing distribution system.
//
// It sends one 25-bit command word every 500 ns on the biphase-mark encoded
// 50 MHz carrier (100 MHz half-cell clock here). Each word carries:
//  - CONVERT, in every word while convert_en is set (the 2 MHz digitization
//    command common to all partitions);
//  - CALIBRATE, SYNC and COLDATA_RESET, each requested by a one-cycle
//    software strobe and sent in the next word;
//  - one trigger from the trigger_master, tagged with its partition;
//  - the low-speed addressed channel: one byte per word, used here to poll an
//    endpoint (poll_req/poll_addr) for a synchronization check.
// The master keeps its own CONVERT count, cleared by SYNC exactly as the
// endpoints do. On a poll it records the count that includes the poll word;
// the polled endpoint answers on the shared return path with its own count,
// which is decoded here (bmc_decoder, cmd_word_rx held in reset while
// unlocked) and compared: sync_ok / sync_err count the matches and
// mismatches.
// The word cadence, the command set, the partitioned triggers and the return
// path follow the specification; the word layout, the polling scheme and the
// request handshakes are this design's choices.
module timing_master
  import pdts_pkg::*;
#(
  parameter int unsigned NBUSY = 8
) (
  input  logic             clk,
  input  logic             rst,
  // run and command control (software)
  input  logic             convert_en,
  input  logic             sync_req,
  input  logic             calib_req,
  input  logic             reset_req,
  input  logic             poll_req,
  input  logic [7:0]       poll_addr,
  // trigger unit
  input  logic             spill_start,
  input  logic             spill_end,
  input  logic             beam_trig,
  input  logic             set_enable,
  input  logic             calib_en,
  input  logic [15:0]      veto_cycles,
  input  logic [23:0]      calib_period,
  input  logic [15:0]      max_outstanding,
  input  logic [1:0]       beam_part,
  input  logic [1:0]       calib_part,
  input  logic [NBUSY-1:0] busy_in,
  input  logic             evt_done,
  // downstream timing stream
  output logic             line,
  output logic             line_oe,
  output logic             word_load,
  // shared return path
  input  logic             ret_line,
  // status
  output logic [15:0]      convert_count,
  output logic             poll_busy,
  output logic [15:0]      ret_words,
  output logic [15:0]      sync_ok,
  output logic [15:0]      sync_err,
  output logic [15:0]      last_echo,
  output logic             in_spill,
  output logic             set_eff,
  output logic [15:0]      outstanding,
  output logic [31:0]      n_trig_sent,
  output logic [31:0]      n_vetoed,
  output logic [31:0]      n_inhibited,
  output logic [31:0]      n_lost,
  output logic [31:0]      n_calib
);
  logic sync_p, calib_p, reset_p, poll_p;
  logic [7:0] poll_a;
  logic trig_pending, trig_calib;
  logic [1:0] trig_part;
  logic bit_req, tx_bit;
  cmd_payload_t pl;
  logic [15:0] expect_count;
  logic expect_valid;

  trigger_master #(.NBUSY(NBUSY)) u_trig (
    .clk, .rst, .spill_start, .spill_end, .beam_trig, .set_enable, .calib_en,
    .veto_cycles, .calib_period, .max_outstanding, .beam_part, .calib_part,
    .busy_in, .evt_done, .word_load, .trig_pending, .trig_calib, .trig_part,
    .in_spill, .set_eff, .outstanding, .n_sent(n_trig_sent), .n_vetoed,
    .n_inhibited, .n_lost, .n_calib);

  always_comb begin
    pl = '0;
    pl.convert       = convert_en;
    pl.calibrate     = calib_p;
    pl.sync          = sync_p;
    pl.coldata_reset = reset_p;
    pl.trig          = trig_pending;
    pl.trig_part     = trig_part;
    pl.trig_calib    = trig_calib;
    pl.addr_valid    = poll_p;
    pl.addr          = poll_a;
  end

  cmd_word_tx u_tx (.clk, .rst, .bit_req, .payload_in(pl), .load(word_load), .bit_out(tx_bit));

  bmc_encoder u_enc (.clk, .rst, .tx_en(!rst), .bit_in(tx_bit), .bit_req, .line, .line_oe);

  // software requests wait for the next word
  always_ff @(posedge clk) begin
    if (rst) begin
      sync_p <= 1'b0; calib_p <= 1'b0; reset_p <= 1'b0; poll_p <= 1'b0; poll_a <= '0;
      convert_count <= '0; expect_count <= '0; expect_valid <= 1'b0;
    end else begin
      if (word_load) begin
        sync_p <= 1'b0; calib_p <= 1'b0; reset_p <= 1'b0; poll_p <= 1'b0;
        if (pl.sync)         convert_count <= {15'd0, pl.convert};
        else if (pl.convert) convert_count <= convert_count + 16'd1;
        if (pl.addr_valid) begin
          expect_count <= pl.sync ? {15'd0, pl.convert}
                                  : convert_count + {15'd0, pl.convert};
          expect_valid <= 1'b1;
        end
      end
      if (sync_req)  sync_p  <= 1'b1;
      if (calib_req) calib_p <= 1'b1;
      if (reset_req) reset_p <= 1'b1;
      if (poll_req && !poll_p) begin
        poll_p <= 1'b1;
        poll_a <= poll_addr;
      end
    end
  end

  assign poll_busy = poll_p;

  // return path: decode and compare echoed counts
  logic r_bv, r_bit, r_locked, r_valid;
  logic [PAYLOAD_BITS-1:0] r_pl;
  ret_payload_t rp;

  bmc_decoder u_rdec (
    .clk, .rst, .line_in(ret_line), .bit_valid(r_bv), .bit_out(r_bit),
    .cell_start(), .locked(r_locked), .viol_count());

  cmd_word_rx u_rrx (
    .clk, .rst(rst || !r_locked), .bit_valid(r_bv), .bit_in(r_bit), .aligned(),
    .word_valid(r_valid), .payload(r_pl), .err_count());

  assign rp = ret_payload_t'(r_pl);

  always_ff @(posedge clk) begin
    if (rst) begin
      ret_words <= '0; sync_ok <= '0; sync_err <= '0; last_echo <= '0;
    end else if (r_valid) begin
      ret_words <= ret_words + 16'd1;
      last_echo <= rp.convert_count;
      if (expect_valid && rp.convert_count == expect_count) sync_ok <= sync_ok + 16'd1;
      else                                                  sync_err <= sync_err + 16'd1;
    end
  end

  // one request of each kind per word: a second strobe before the word is
  // loaded is merged with the first
  a_poll_addr_stable: assert property (@(posedge clk) disable iff (rst)
    (poll_p && !word_load) |=> (poll_a == $past(poll_a)));
endmodule
