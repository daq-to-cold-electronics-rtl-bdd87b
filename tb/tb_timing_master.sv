// tb_timing_master: decodes the master's biphase-mark line in the testbench
// and checks: one well-formed 25-bit word every 50 cycles (500 ns), CONVERT
// in every word while enabled, SYNC/CALIBRATE/COLDATA_RESET requests in the
// next word only, a beam trigger with its partition, a poll with its address,
// and the synchronization check on the return path (a correct and a wrong
// echoed CONVERT count sent by the testbench's own return transmitter).
// At the end every request must have appeared in exactly one word.
module tb_timing_master;
  import pdts_pkg::*;
  logic clk = 0, rst = 1;
  logic convert_en = 0, sync_req = 0, calib_req = 0, reset_req = 0, poll_req = 0;
  logic [7:0] poll_addr = 8'd7;
  logic spill_start = 0, spill_end = 0, beam_trig = 0, set_enable = 0, calib_en = 0;
  logic [15:0] veto_cycles = 16'd10, max_outstanding = 16'd8;
  logic [23:0] calib_period = 24'd1000;
  logic [1:0] beam_part = 2'd2, calib_part = 2'd3;
  logic [7:0] busy_in = '0;
  logic evt_done = 0;
  logic line, line_oe, word_load, ret_line = 0, poll_busy, in_spill, set_eff;
  logic [15:0] convert_count, ret_words, sync_ok, sync_err, last_echo, outstanding;
  logic [31:0] n_trig_sent, n_vetoed, n_inhibited, n_lost, n_calib;
  int checks = 0, failures = 0;
  timing_master dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #800000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---- line decoder: cells are two cycles from the first cycle after reset
  logic prev_s = 0;
  int half = 0, nbits = 0, nwords = 0, badwords = 0;
  logic [24:0] wsh;
  logic [18:0] words[$];
  logic b_first;
  int bad_boundary = 0;
  always @(posedge clk) begin
    if (!rst) begin
      #1;
      if (half == 0) begin
        if (line == prev_s) bad_boundary++;
        b_first = line;
      end else begin
        wsh = {wsh[23:0], line ^ b_first};
        nbits++;
        if (nbits % 25 == 0) begin
          nwords++;
          if (wsh[24:20] != 5'b11010 || ^wsh != 0) badwords++;
          words.push_back(wsh[19:1]);
        end
      end
      prev_s = line;
      half = 1 - half;
    end
  end

  // ---- return transmitter model
  task automatic send_return(input logic [15:0] cnt);
    logic [24:0] w;
    logic lv;
    w = {5'b11010, cnt, 3'b100, 1'b0};
    w[0] = ^w[24:1];
    lv = 0;
    for (int k = 0; k < 5; k++)
      for (int b = 24; b >= 0; b--) begin
        @(negedge clk); lv = ~lv; ret_line = lv;
        @(negedge clk); if (w[b]) lv = ~lv; ret_line = lv;
      end
    @(negedge clk); ret_line = 0;
    repeat (20) @(negedge clk);
  endtask

  function automatic cmd_payload_t last_word(); return cmd_payload_t'(words[words.size()-1]); endfunction

  task automatic next_word(); int n; n = nwords; while (nwords == n) @(negedge clk); endtask

  initial begin
    cmd_payload_t p;
    int nconv, t0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (3) next_word();
    chk(bad_boundary == 0 && badwords == 0, "well-formed biphase-mark words");
    p = last_word(); chk(!p.convert, "no CONVERT while disabled");
    convert_en = 1;
    next_word(); next_word();
    t0 = $time;
    for (int i = 0; i < 10; i++) begin next_word(); p = last_word(); chk(p.convert, "CONVERT every word"); end
    chk(($time - t0) == 10 * 500, "one word per 500 ns");
    // SYNC request: the next word carries SYNC, the one after does not
    next_word();
    @(negedge clk); sync_req = 1; @(negedge clk); sync_req = 0;
    next_word(); next_word(); p = last_word(); chk(p.sync && p.convert, "SYNC in next word");
    next_word(); p = last_word(); chk(!p.sync, "SYNC once");
    @(negedge clk); calib_req = 1; reset_req = 1; @(negedge clk); calib_req = 0; reset_req = 0;
    next_word(); next_word(); p = last_word(); chk(p.calibrate && p.coldata_reset, "CALIBRATE and COLDATA_RESET");
    // beam trigger in spill
    set_enable = 1;
    @(negedge clk); spill_start = 1; @(negedge clk); spill_start = 0;
    @(negedge clk); beam_trig = 1; @(negedge clk); beam_trig = 0;
    next_word(); next_word(); p = last_word();
    chk(p.trig && !p.trig_calib && p.trig_part == 2'd2, "trigger with partition");
    // poll; count converts since SYNC from the decoded words
    @(negedge clk); poll_req = 1; @(negedge clk); poll_req = 0;
    next_word(); next_word(); p = last_word();
    chk(p.addr_valid && p.addr == 8'd7, "poll address sent");
    nconv = 0;
    foreach (words[i]) begin
      cmd_payload_t q; q = cmd_payload_t'(words[i]);
      if (q.sync) nconv = q.convert; else if (q.convert) nconv++;
      if (q.addr_valid) break;
    end
    chk(convert_count >= 16'(nconv), "master count");
    send_return(16'(nconv));
    chk(sync_ok >= 1 && sync_err == 0 && last_echo == 16'(nconv), "matching echo accepted");
    // a second poll answered with a wrong count
    @(negedge clk); poll_req = 1; @(negedge clk); poll_req = 0;
    next_word(); next_word();
    send_return(16'(nconv + 100));
    chk(sync_err >= 1, "mismatching echo flagged");
    chk(ret_words >= 2, "return words received");
    chk(badwords == 0 && bad_boundary == 0, "line stays well formed");
    // every request appears in exactly one word
    begin
      int ns, nc, nr, np, nt;
      ns = 0; nc = 0; nr = 0; np = 0; nt = 0;
      foreach (words[i]) begin
        cmd_payload_t q; q = cmd_payload_t'(words[i]);
        ns += q.sync; nc += q.calibrate; nr += q.coldata_reset; np += q.addr_valid; nt += q.trig;
      end
      chk(ns == 1, "one SYNC word");
      chk(nc == 1, "one CALIBRATE word");
      chk(nr == 1, "one COLDATA_RESET word");
      chk(np == 2, "one word per poll");
      chk(nt == 1 && n_trig_sent == 1, "one trigger word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
