// tb_wib_frame_tx: a front-end model feeds COLDATA blocks of 55 words (first
// word {ChkSm B, ChkSm A}); CONVERT strobes come every 125 link cycles
// (500 ns at 250 MHz). Checked against values computed here: idle words
// before the first CONVERT, every frame row (comma, header fields, WIB
// headers, unaltered COLDATA words, CRC-32 by a bit-serial model), one
// frame of 123 words per CONVERT with idles in between, the 8b/10b code
// stream (decoded without errors), checksum errors reported in the next
// header, missing data, overrun and the test pattern.
module tb_wib_frame_tx;
  logic clk = 0, rst = 1, convert_evt = 0, sync_evt = 0, test_mode = 0;
  logic [15:0] convert_count = '0;
  logic [23:0] reset_count = 24'hABCDEF;
  logic [4:0] crate = 5'd9; logic [2:0] slot = 3'd4; logic [1:0] link = 2'd2;
  logic cd_valid = 0, cd_sof = 0; logic [15:0] cd_data = '0;
  logic [19:0] link_code; logic [15:0] tx_word; logic [1:0] tx_k; logic in_frame;
  logic [31:0] frames_sent; logic [15:0] err_count, missing_count, overrun_count, fifo_overflow;
  int checks = 0, failures = 0;
  wib_frame_tx dut (.*);
  always #2 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [31:0] crc_word(input logic [31:0] c, input logic [15:0] d);
    for (int b = 15; b >= 0; b--) begin
      logic fb; fb = c[31] ^ d[b]; c = c << 1; if (fb) c ^= 32'h04C11DB7;
    end
    return c;
  endfunction

  // 8b/10b check of the output stream with the decoder
  logic rd = 0, rd_m, rd_n, ce0, ce1, de0, de1, k0, k1;
  logic [7:0] d0, d1;
  int code_bad = 0;
  dec8b10b u_d0 (.code(link_code[19:10]), .rd_in(rd), .data(d0), .k(k0), .rd_out(rd_m), .code_err(ce0), .disp_err(de0));
  dec8b10b u_d1 (.code(link_code[9:0]), .rd_in(rd_m), .data(d1), .k(k1), .rd_out(rd_n), .code_err(ce1), .disp_err(de1));

  // record the transmitted words
  logic [15:0] fw[$];          // words of the current frame
  logic [15:0] frames[$][$];   // finished frames
  int fstart[$];
  int cyc = 0, idle_bad = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (cyc > 3) begin
      if (ce0 || ce1 || de0 || de1 || {d1, d0} != tx_word || {k1, k0} != tx_k) code_bad++;
      rd = rd_n;
    end
    if (tx_k == 2'b01 && tx_word[7:0] == 8'hBC) begin fw = {}; fw.push_back(tx_word); fstart.push_back(cyc); end
    else if (tx_k == 2'b00 && fw.size() > 0) begin
      fw.push_back(tx_word);
      if (fw.size() == 123) begin frames.push_back(fw); fw = {}; end
    end else if (!(tx_k == 2'b11 && tx_word == 16'h5C3C)) idle_bad++;
  end

  // front-end model: one block of 55 words
  task automatic send_block(input int seed, input logic bad_sum, ref logic [15:0] blk[$]);
    logic [7:0] sa, sb;
    logic [15:0] w;
    sa = 0; sb = 0; blk = {};
    for (int i = 1; i < 55; i++) begin w = 16'(seed * 977 + i * 131); blk.push_back(w); sa += w[7:0]; sb += w[15:8]; end
    if (bad_sum) sa = sa + 1;
    blk.push_front({sb, sa});
    for (int i = 0; i < 55; i++) begin
      @(negedge clk); cd_valid = 1; cd_sof = (i == 0); cd_data = blk[i];
    end
    @(negedge clk); cd_valid = 0; cd_sof = 0;
  endtask

  task automatic convert(); @(negedge clk); convert_evt = 1; convert_count++; @(negedge clk); convert_evt = 0; endtask
  task automatic wait_to(input int c); while (cyc < c) @(negedge clk); endtask

  logic [15:0] b1[$], b2[$];
  logic [15:0] exp_b[$][$];
  logic [15:0] cc[$];

  initial begin
    int c0, nf;
    logic [31:0] crc;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (20) @(negedge clk);
    chk(idle_bad == 0 && frames.size() == 0, "idle before CONVERT");
    // three frames of good data, CONVERT every 125 cycles
    c0 = cyc + 300;
    for (int f = 0; f < 3; f++) begin
      send_block(2 * f, 0, b1); send_block(2 * f + 1, 0, b2);
      exp_b.push_back(b1); exp_b.push_back(b2);
      wait_to(c0 + 125 * f); convert(); cc.push_back(convert_count);
    end
    // a frame whose first block has a bad checksum, then one that reports it
    send_block(10, 1, b1); send_block(11, 0, b2); exp_b.push_back(b1); exp_b.push_back(b2);
    wait_to(c0 + 375); convert(); cc.push_back(convert_count);
    send_block(12, 0, b1); send_block(13, 0, b2); exp_b.push_back(b1); exp_b.push_back(b2);
    wait_to(c0 + 500); convert(); cc.push_back(convert_count);
    wait_to(c0 + 640);
    nf = frames.size();
    chk(nf == 5, "one frame per CONVERT");
    for (int f = 1; f < fstart.size(); f++) chk(fstart[f] - fstart[f-1] == 125, "frame every 125 word slots");
    chk(idle_bad == 0, "only idles between frames");
    chk(code_bad == 0, "8b/10b stream decodes");
    for (int f = 0; f < nf; f++) begin
      logic [15:0] w[$];
      w = frames[f];
      chk(w[0] == {5'd9, 3'd4, 8'hBC}, "row 0");
      chk(w[1] == {8'hEF, 4'd1, 2'b00, 2'd2} && w[2] == 16'hABCD, "rows 1-2 reset count");
      chk(w[3] == cc[f], "row 3 CONVERT count");
      chk(w[7][0] == (f == 4) && w[4][0] == (f == 4), "checksum error reported in next header");
      for (int i = 0; i < 55; i++) begin
        chk(w[9 + i] == exp_b[2*f][i], "COLDATA block 1 unaltered");
        chk(w[66 + i] == exp_b[2*f+1][i], "COLDATA block 2 unaltered");
      end
      crc = 32'hFFFFFFFF;
      for (int i = 1; i <= 120; i++) crc = crc_word(crc, w[i]);
      chk(w[121] == crc[15:0] && w[122] == crc[31:16], "CRC-32 trailer");
      if (f > 0) chk({frames[f][6], frames[f][5]} - {frames[f-1][6], frames[f-1][5]} inside {32'd62, 32'd63},
                     "timestamp at 125 MHz");
    end
    chk(err_count == 1 && frames_sent == 5, "checksum error counted");
    // CONVERT without data: no frame, counted
    wait_to(c0 + 750); convert();
    wait_to(c0 + 875);
    chk(frames.size() == 5 && missing_count == 1, "missing data");
    // test pattern: no FEMB data needed
    test_mode = 1;
    convert(); wait_to(c0 + 1010);
    test_mode = 0;
    chk(frames.size() == 6, "test-pattern frame");
    if (frames.size() == 6) begin
      logic [15:0] w[$];
      w = frames[5];
      for (int i = 1; i < 55; i++) chk(w[9 + i] == w[9] + 16'(i), "incrementing pattern");
      chk(w[66] == w[9] + 16'd55, "pattern continues in block 2");
      chk(w[4][4] == 1, "missing-data flag in header");
    end
    // overrun: a CONVERT while a frame is on the wire
    test_mode = 1;
    convert(); repeat (20) @(negedge clk); convert();
    repeat (130) @(negedge clk);
    chk(overrun_count == 1, "overrun counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
