// tb_rce_frame_rx: the testbench builds frames itself (comma row, header,
// random payload, bit-serial CRC-32), encodes them with enc8b10b and feeds
// the receiver. Checked: good frames counted and passed on row by row, header
// fields captured, idle words counted, a corrupted payload word gives a CRC
// error, a corrupted code a code error, a frame cut short by idles is
// counted as truncated, and a skipped CONVERT count shows as a gap.
module tb_rce_frame_rx;
  logic clk = 0, rst = 1;
  logic [19:0] link_code;
  logic rx_valid, frame_ok;
  logic [6:0] rx_row;
  logic [15:0] rx_word, crc_errors, trunc_frames, code_errors, disp_errors, convert_gaps, last_convert, last_err_bits;
  logic [31:0] good_frames, idle_words, last_timestamp;
  int checks = 0, failures = 0;
  rce_frame_rx dut (.*);
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

  // encoder pair with running disparity
  logic [15:0] e_w = 16'h5C3C; logic [1:0] e_k = 2'b11; logic e_rd = 0, e_mid, e_nx;
  logic [9:0] e_lo, e_hi;
  logic [19:0] flip = '0;
  enc8b10b u_e0 (.data(e_w[7:0]),  .k(e_k[0]), .rd_in(e_rd),  .code(e_lo), .rd_out(e_mid));
  enc8b10b u_e1 (.data(e_w[15:8]), .k(e_k[1]), .rd_in(e_mid), .code(e_hi), .rd_out(e_nx));
  assign link_code = {e_lo, e_hi} ^ flip;

  task automatic put(input logic [15:0] w, input logic [1:0] k, input logic [19:0] f = '0);
    @(negedge clk);
    e_w = w; e_k = k; flip = f;
    @(posedge clk); #1 e_rd = e_nx;
  endtask

  // rows seen
  logic [15:0] got[$];
  always @(posedge clk) if (!rst && rx_valid) got.push_back(rx_word);

  logic [15:0] sent[$];
  task automatic frame(input logic [15:0] conv, input int corrupt_row = -1, input int cut = 123);
    logic [15:0] w[123];
    logic [31:0] c;
    w[0] = 16'h4CBC; w[1] = 16'h1234; w[2] = 16'h0056; w[3] = conv; w[4] = 16'h0000;
    w[5] = 16'h5555; w[6] = conv;
    for (int i = 7; i < 121; i++) w[i] = 16'($urandom);
    c = 32'hFFFFFFFF;
    for (int i = 1; i < 121; i++) c = crc_word(c, w[i]);
    w[121] = c[15:0]; w[122] = c[31:16];
    if (corrupt_row > 0) w[corrupt_row] ^= 16'h0100;
    sent = {};
    for (int i = 0; i < cut; i++) begin
      put(w[i], (i == 0) ? 2'b01 : 2'b00);
      if (i > 0) sent.push_back(w[i]);
    end
  endtask

  task automatic idles(input int n); repeat (n) put(16'h5C3C, 2'b11); endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    idles(10);
    chk(idle_words >= 8 && good_frames == 0, "idle words");
    got = {};
    frame(16'd1); idles(2);
    chk(good_frames == 1 && crc_errors == 0 && code_errors == 0 && disp_errors == 0, "good frame");
    chk(got.size() == 122, "rows passed on");
    foreach (got[i]) if (i < sent.size()) chk(got[i] == sent[i], "row content");
    chk(last_convert == 16'd1 && last_timestamp == {16'd1, 16'h5555}, "header captured");
    for (int f = 2; f <= 5; f++) begin frame(16'(f)); idles(2); end
    chk(good_frames == 5 && convert_gaps == 0, "consecutive frames");
    // CRC error: one payload bit changed (valid code words)
    frame(16'd6, 50); idles(2);
    chk(crc_errors == 1 && good_frames == 5, "CRC error detected");
    // code error: a line bit flipped in an idle word
    put(16'h5C3C, 2'b11, 20'h00010);
    idles(3);
    chk(code_errors + disp_errors >= 1, "8b/10b code or disparity error counted");
    // truncated frame
    frame(16'd7, -1, 60); idles(3);
    chk(trunc_frames == 1, "truncated frame counted");
    // gap: CONVERT count jumps from 5 to 9
    frame(16'd9); idles(2);
    chk(good_frames == 6 && convert_gaps == 1, "missing frame detected from CONVERT count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
