// tb_pdts_system_top: end-to-end run of the whole slice at its default
// parameters (four links, eight busy lines). A front-end model on each link
// digitizes on every rising edge of the WIB's 2 MHz CONVERT clock and sends
// two COLDATA blocks of 55 words; the RCE receivers must get every block
// unaltered, in order, in frames with good CRCs.
// Each mechanism of the design is made to happen and counted: timing lock
// and word alignment, CONVERT clock edges, SYNC, CALIBRATE and COLDATA_RESET
// pulses, beam triggers reaching the RCE of their partition, triggers of
// another partition ignored, pile-up veto, SET throttled by a busy line and
// by the outstanding-trigger credit, calibration triggers outside the
// spill, return-path polls of both endpoints with matching counts, a
// CONVERT with no data buffered, test-pattern frames, link errors on the
// fibre (CRC and 8b/10b), idle links with CONVERT off, and the WIB address.
module tb_pdts_system_top;
  localparam int NL = 4;
  logic clk_tim = 0, clk_link = 0, rst_tim = 1, rst_link = 1;
  logic convert_en = 0, sync_req = 0, calib_req = 0, reset_req = 0, poll_req = 0;
  logic [7:0] poll_addr = '0;
  logic set_enable = 0, calib_en = 0;
  logic [15:0] veto_cycles = 16'd20, max_outstanding = 16'd3;
  logic [23:0] calib_period = 24'd150;
  logic [1:0] beam_part = 2'd1, calib_part = 2'd3;
  logic spill_start = 0, spill_end = 0, beam_trig = 0;
  logic [7:0] rce_busy = '0;
  logic evt_done = 0;
  logic [15:0] master_convert_count, sync_ok, sync_err, ret_words;
  logic in_spill, set_eff;
  logic [31:0] n_trig_sent, n_vetoed, n_inhibited, n_calib;
  logic [4:0] wib_crate = 5'd3; logic [2:0] wib_slot = 3'd2;
  logic test_mode = 0;
  logic [31:0] wib_ip; logic wib_ip_valid, wib_locked, wib_aligned;
  logic femb_clk50, femb_convert_clk, femb_calibrate, femb_sync, femb_reset;
  logic [15:0] wib_convert_count;
  logic [NL-1:0] cd_valid = '0, cd_sof = '0;
  logic [NL-1:0][15:0] cd_data = '0;
  logic [NL-1:0][19:0] link_code, fibre_err_mask = '0;
  logic [NL-1:0][15:0] wib_err_count;
  logic [NL-1:0][31:0] wib_frames_sent;
  logic rce_cfg_we = 0, rce_cfg_enable = 0; logic [1:0] rce_cfg_part = '0;
  logic rce_trig, rce_trig_calib;
  logic [31:0] rce_trig_accepted, rce_trig_ignored;
  logic [NL-1:0] rx_valid;
  logic [NL-1:0][6:0] rx_row;
  logic [NL-1:0][15:0] rx_word;
  logic [NL-1:0][31:0] rx_good_frames;
  logic [NL-1:0][15:0] rx_crc_errors, rx_code_errors, rx_convert_gaps;
  int checks = 0, failures = 0;

  pdts_system_top dut (.*);

  always #5 clk_tim = ~clk_tim;
  always #2 clk_link = ~clk_link;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #3000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- front-end model ----------------
  logic femb_on = 0;
  logic [15:0] exp_blocks[NL][$][$];   // per link, blocks in sending order
  int n_conv_edges = 0, n_cal = 0, n_sync = 0, n_rst = 0;
  logic cc_q = 0, cal_q = 0, syn_q = 0, rst_q = 0;
  always @(posedge clk_tim) if (!rst_tim) begin
    if (femb_convert_clk && !cc_q) n_conv_edges++;
    if (femb_calibrate && !cal_q) n_cal++;
    if (femb_sync && !syn_q) n_sync++;
    if (femb_reset && !rst_q) n_rst++;
    cc_q <= femb_convert_clk; cal_q <= femb_calibrate; syn_q <= femb_sync; rst_q <= femb_reset;
  end

  int sample = 0;
  logic cc_l1 = 0, cc_l2 = 0;
  always @(posedge clk_link) begin cc_l1 <= femb_convert_clk; cc_l2 <= cc_l1; end
  initial begin
    forever begin
      @(posedge clk_link);
      if (cc_l1 && !cc_l2 && femb_on) begin
        logic [15:0] blk[NL][2][$];
        for (int l = 0; l < NL; l++)
          for (int b = 0; b < 2; b++) begin
            logic [7:0] sa, sb; logic [15:0] w;
            sa = 0; sb = 0; blk[l][b] = {};
            for (int i = 1; i < 55; i++) begin
              w = 16'($urandom); blk[l][b].push_back(w); sa += w[7:0]; sb += w[15:8];
            end
            blk[l][b].push_front({sb, sa});
            exp_blocks[l].push_back(blk[l][b]);
          end
        sample++;
        for (int b = 0; b < 2; b++)
          for (int i = 0; i < 55; i++) begin
            @(negedge clk_link);
            for (int l = 0; l < NL; l++) begin
              cd_valid[l] = 1; cd_sof[l] = (i == 0); cd_data[l] = blk[l][b][i];
            end
          end
        @(negedge clk_link); cd_valid = '0; cd_sof = '0;
      end
    end
  end

  // ---------------- RCE side: compare payload rows ----------------
  int data_frames[NL], data_bad[NL], tp_frames = 0;
  logic [15:0] cur[NL][$];
  logic in_test = 0;
  always @(posedge clk_link) if (!rst_link) begin
    for (int l = 0; l < NL; l++) if (rx_valid[l]) begin
      if (rx_row[l] == 7'd1) cur[l] = {};
      cur[l].push_back(rx_word[l]);
      if (rx_row[l] == 7'd122) begin
        int bad, pat;
        bad = 0; pat = 1;
        // rows 9..63 and 66..120 (index = row - 1)
        for (int i = 9; i < 63; i++) if (cur[l][i] != cur[l][i - 1] + 16'd1) pat = 0;
        if (exp_blocks[l].size() >= 2) begin
          for (int i = 0; i < 55; i++) begin
            if (cur[l][8 + i]  != exp_blocks[l][0][i]) bad++;
            if (cur[l][65 + i] != exp_blocks[l][1][i]) bad++;
          end
        end else bad = 1;
        if (bad == 0) begin
          void'(exp_blocks[l].pop_front()); void'(exp_blocks[l].pop_front());
          data_frames[l]++;
        end else if (pat && in_test) tp_frames++;
        else begin
          data_bad[l]++;
          if (exp_blocks[l].size() >= 2) begin void'(exp_blocks[l].pop_front()); void'(exp_blocks[l].pop_front()); end
        end
      end
    end
  end

  // RCE triggers
  int rce_trigs = 0;
  always @(posedge clk_tim) if (!rst_tim && rce_trig) rce_trigs++;

  task automatic tpulse(ref logic s); @(negedge clk_tim); s = 1; @(negedge clk_tim); s = 0; endtask
  task automatic words(input int n); repeat (n * 50) @(negedge clk_tim); endtask

  initial begin
    int g0[NL], m0, v0, i0, c0, s0;
    repeat (5) @(negedge clk_tim);
    rst_tim = 0; rst_link = 0;
    // lock and align; CONVERT off: links idle
    words(8);
    chk(wib_locked && wib_aligned, "WIB endpoint locked and aligned");
    chk(wib_ip_valid && wib_ip == 32'hC0A80302, "WIB address from crate and slot");
    for (int l = 0; l < NL; l++) chk(wib_frames_sent[l] == 0 && rx_good_frames[l] == 0, "no frames without CONVERT");
    chk(n_conv_edges == 0, "no CONVERT clock while disabled");
    // RCE in partition 1
    @(negedge clk_tim); rce_cfg_we = 1; rce_cfg_part = 2'd1; rce_cfg_enable = 1; @(negedge clk_tim); rce_cfg_we = 0;
    // start converting; SYNC clears the counters
    femb_on = 1;
    convert_en = 1;
    tpulse(sync_req);
    words(12);
    chk(n_sync == 1, "SYNC pulse to the front end");
    chk(n_conv_edges >= 10, "2 MHz CONVERT clock running");
    chk(wib_convert_count == master_convert_count || wib_convert_count + 1 == master_convert_count,
        "WIB follows the master CONVERT count");
    // the first CONVERT after start finds no data buffered (pipeline of one sample)
    for (int l = 0; l < NL; l++) chk(wib_err_count[l] >= 1, "first CONVERT without data flagged");
    for (int l = 0; l < NL; l++) g0[l] = rx_good_frames[l];
    words(20);
    for (int l = 0; l < NL; l++) begin
      chk(rx_good_frames[l] - g0[l] >= 19, "one frame per CONVERT on every link");
      chk(rx_crc_errors[l] == 0 && rx_code_errors[l] == 0, "clean links");
      chk(data_frames[l] >= 25 && data_bad[l] == 0, "COLDATA delivered unaltered and in order");
    end
    for (int l = 0; l < NL; l++) chk(rx_convert_gaps[l] == 0, "no lost frames while data flow");
    // calibrate and COLDATA reset commands
    tpulse(calib_req); words(2); tpulse(reset_req); words(2);
    chk(n_cal == 1 && n_rst == 1, "CALIBRATE and COLDATA_RESET pulses");
    // synchronization check of both endpoints over the return path
    poll_addr = 8'h01; tpulse(poll_req); words(8);
    poll_addr = 8'h02; tpulse(poll_req); words(8);
    chk(sync_ok >= 4 && sync_err == 0, "both endpoints answer with matching counts");
    // beam triggers in spill, partition 1
    set_enable = 1;
    tpulse(spill_start);
    tpulse(beam_trig); words(2);
    chk(rce_trigs == 1 && rce_trig_accepted == 1 && !rce_trig_calib, "beam trigger reaches the RCE");
    // pile-up
    v0 = n_vetoed;
    tpulse(beam_trig); repeat (5) @(negedge clk_tim); tpulse(beam_trig); words(2);
    chk(n_vetoed == v0 + 1, "pile-up veto");
    // credit: 2 triggers outstanding, one more fills the limit of 3
    tpulse(beam_trig); words(2);
    chk(!set_eff, "credit exhausted");
    i0 = n_inhibited;
    tpulse(beam_trig); words(2);
    chk(n_inhibited == i0 + 1, "trigger inhibited by credit");
    repeat (3) tpulse(evt_done);
    // busy line
    rce_busy[3] = 1; i0 = n_inhibited;
    tpulse(beam_trig); words(2);
    chk(n_inhibited == i0 + 1, "trigger inhibited by busy");
    rce_busy = '0;
    // out of spill: calibration triggers for partition 3, ignored by this RCE
    tpulse(spill_end);
    c0 = n_calib; s0 = rce_trig_ignored;
    calib_en = 1; words(4); calib_en = 0; words(1);
    repeat (8) tpulse(evt_done);
    chk(n_calib > c0 && rce_trig_ignored > s0, "calibration triggers of another partition ignored");
    chk(rce_trigs == rce_trig_accepted && rce_trig_accepted == 3, "RCE triggers of its partition only");
    // link error on fibre 2 for one word
    m0 = rx_crc_errors[2] + rx_code_errors[2];
    // one line bit flipped inside a frame
    while (!(rx_valid[2] && rx_row[2] == 7'd40)) @(negedge clk_link);
    fibre_err_mask[2] = 20'h00400; @(negedge clk_link); fibre_err_mask[2] = '0;
    words(3);
    chk(rx_crc_errors[2] + rx_code_errors[2] > m0, "fibre error detected");
    // test pattern instead of front-end data
    femb_on = 0; words(2);
    in_test = 1; test_mode = 1; words(6); test_mode = 0; words(1); in_test = 0;
    chk(tp_frames >= 4 * NL, "test-pattern frames");
    // stop converting: idles only
    convert_en = 0; words(2);
    for (int l = 0; l < NL; l++) g0[l] = rx_good_frames[l];
    words(4);
    for (int l = 0; l < NL; l++) chk(rx_good_frames[l] == g0[l], "idle link without CONVERT");
    for (int l = 0; l < NL; l++) chk(rx_convert_gaps[l] >= 1, "frames skipped while front ends were off are detected");
    for (int l = 0; l < NL; l++) chk(data_bad[l] == ((l == 2) ? 1 : 0), "only the hit frame is damaged");
    chk(sync_err == 0, "no sync mismatch");
    $display("mechanisms: convert_edges=%0d sync=%0d cal=%0d rst=%0d rce_trigs=%0d vetoed=%0d inhibited=%0d calib=%0d polls_ok=%0d test_frames=%0d",
             n_conv_edges, n_sync, n_cal, n_rst, rce_trigs, n_vetoed, n_inhibited, n_calib, sync_ok, tp_frames);
    begin
      int werr, lerr, gaps, good, dfr;
      werr = 0; lerr = 0; gaps = 0; good = 0; dfr = 0;
      for (int l = 0; l < NL; l++) begin
        werr += wib_err_count[l]; lerr += rx_crc_errors[l] + rx_code_errors[l];
        gaps += rx_convert_gaps[l]; good += rx_good_frames[l]; dfr += data_frames[l];
      end
      $display("mechanisms: good_frames=%0d data_frames=%0d wib_flagged_errors=%0d link_errors=%0d convert_gaps=%0d rce_trig_ignored=%0d",
               good, dfr, werr, lerr, gaps, rce_trig_ignored);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
