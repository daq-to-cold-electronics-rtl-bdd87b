// tb_cmd_word_rx: feeds the aligner a bit stream built here (junk bits, then
// framed words) and checks alignment, delivered payloads, error counting and
// loss of alignment after three bad words, then realignment at a random bit
// offset with payloads that contain copies of the preamble. Every delivered
// payload is compared with the sent one.
module tb_cmd_word_rx;
  logic clk = 0, rst = 1, bit_valid = 0, bit_in = 0;
  logic aligned, word_valid;
  logic [18:0] payload;
  logic [15:0] err_count;
  int checks = 0, failures = 0;
  cmd_word_rx dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [24:0] ref_word(input logic [18:0] p);
    logic [24:0] w;
    logic par;
    w = {5'b11010, p, 1'b0};
    par = 0;
    for (int i = 1; i < 25; i++) par ^= w[i];
    w[0] = par;
    return w;
  endfunction

  logic [18:0] exp_q[$];
  int got_n = 0, bad_n = 0;
  logic resync = 0;   // first word after realignment: skip the words used to align
  always @(posedge clk) if (!rst && word_valid) begin
    if (resync) begin
      for (int k = 0; k < 3 && exp_q.size() != 0 && exp_q[0] != payload; k++) void'(exp_q.pop_front());
      resync = 0;
    end
    got_n++;
    if (exp_q.size() == 0 || payload != exp_q[0]) bad_n++;
    chk(exp_q.size() != 0 && payload == exp_q[0], "delivered payload equals sent payload");
    if (exp_q.size() != 0) void'(exp_q.pop_front());
  end

  task automatic send_word(input logic [24:0] w);
    for (int b = 24; b >= 0; b--) begin
      @(negedge clk); bit_valid = 1; bit_in = w[b];
      @(negedge clk); bit_valid = 0;
    end
  endtask

  initial begin
    #600000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [18:0] p;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 13; i++) send_word(25'(0)) ;   // zeros: no preamble
    for (int i = 0; i < 7; i++) begin @(negedge clk); bit_valid = 1; bit_in = 1'($urandom); @(negedge clk); bit_valid = 0; end
    // three words align; the third is delivered
    for (int i = 0; i < 3; i++) begin
      p = 19'($urandom);
      if (i == 2) exp_q.push_back(p);
      send_word(ref_word(p));
    end
    chk(aligned, "aligned after three words");
    for (int i = 0; i < 20; i++) begin
      p = 19'($urandom); exp_q.push_back(p); send_word(ref_word(p));
    end
    repeat (4) @(negedge clk);
    chk(got_n == 21 && bad_n == 0, "all payloads delivered in order");
    chk(err_count == 0, "no errors");
    // one corrupted word: counted, alignment kept
    send_word(ref_word(19'h1234) ^ 25'h40);
    p = 19'h2BEEF; exp_q.push_back(p); send_word(ref_word(p));
    repeat (4) @(negedge clk);
    chk(err_count == 1, "bad word counted");
    chk(aligned && got_n == 22 && bad_n == 0, "alignment kept after one bad word");
    // three bad words drop alignment
    for (int i = 0; i < 3; i++) send_word(ref_word(19'h0F0F0) ^ 25'h1);
    chk(!aligned, "alignment lost");
    chk(err_count == 4, "all bad words counted");
    // realign at another bit offset; payloads hold copies of the preamble,
    // which must not pull the aligner to a wrong position
    exp_q.delete(); resync = 1;
    for (int i = 0, n = 1 + $urandom % 24; i < n; i++) begin
      @(negedge clk); bit_valid = 1; bit_in = 1'($urandom); @(negedge clk); bit_valid = 0;
    end
    for (int i = 0; i < 60; i++) begin
      p = 19'($urandom);
      if (i % 3 == 0) p[18:14] = 5'b11010;
      if (i % 4 == 1) p[9:5]   = 5'b11010;
      exp_q.push_back(p);
      send_word(ref_word(p));
    end
    chk(aligned, "realigned at a new offset");
    chk(exp_q.size() <= 1, "every word after realignment delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
