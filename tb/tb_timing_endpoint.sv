// tb_timing_endpoint: the testbench builds the downstream biphase-mark
// stream of framed command words itself and checks that the endpoint locks,
// aligns, delivers every payload in order, produces a 50 MHz clock in phase
// with the bit cells, keeps a CONVERT count, and answers a poll of its own
// address (and only that) with a burst of return words carrying the count;
// the return line is decoded here.
module tb_timing_endpoint;
  import pdts_pkg::*;
  logic clk = 0, rst = 1, line_in = 0;
  logic [7:0] my_addr = 8'h21;
  logic locked, aligned, clk50, cmd_valid, ret_line, ret_oe;
  cmd_payload_t cmd;
  logic [15:0] convert_count, viol_count, word_err_count;
  logic [7:0] slip_count;
  int checks = 0, failures = 0;
  timing_endpoint dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [24:0] ref_word(input logic [18:0] p);
    logic [24:0] w;
    w = {5'b11010, p, 1'b0};
    w[0] = ^w[24:1];
    return w;
  endfunction

  // downstream: cell boundary on the cycles where bnd is set
  logic bnd = 0;
  task automatic send_word(input logic [18:0] p);
    logic [24:0] w;
    w = ref_word(p);
    for (int b = 24; b >= 0; b--) begin
      @(negedge clk); line_in = ~line_in; bnd = 1;
      @(negedge clk); if (w[b]) line_in = ~line_in; bnd = 0;
    end
  endtask

  // delivered payloads
  cmd_payload_t got[$];
  always @(posedge clk) if (!rst && cmd_valid) got.push_back(cmd);

  // clk50 phase: after lock it must be high while the first half-cell is
  // driven and low during the second (a fixed phase to the bit cell)
  int ph_bad = 0, ph_n = 0;
  always @(negedge clk) if (aligned) begin
    #1; ph_n++; if (clk50 != bnd) ph_bad++;
  end

  // return-line decoder
  logic rl_prev = 0, rl_first;
  int rhalf = 0, rbits = 0;
  logic [24:0] rsh;
  logic [18:0] rwords[$];
  int rbad = 0, oe_cycles = 0;
  always @(posedge clk) begin
    #1;
    if (ret_oe) begin
      oe_cycles++;
      if (rhalf == 0) begin
        if (ret_line == rl_prev) rbad++;
        rl_first = ret_line;
      end else begin
        rsh = {rsh[23:0], ret_line ^ rl_first};
        rbits++;
        if (rbits % 25 == 0) begin
          if (rsh[24:20] != 5'b11010 || ^rsh != 0) rbad++;
          rwords.push_back(rsh[19:1]);
        end
      end
      rl_prev = ret_line;
      rhalf = 1 - rhalf;
    end else begin
      rhalf = 0; rl_prev = 0;
    end
  end

  initial begin
    cmd_payload_t p;
    cmd_payload_t sent[$];
    int n0, nconv;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // idle words (CONVERT off) to lock and align
    for (int i = 0; i < 6; i++) send_word('0);
    chk(locked && aligned, "locked and aligned");
    n0 = got.size() + 1;    // the last idle word is still in the pipeline
    nconv = 0;
    for (int i = 0; i < 30; i++) begin
      p = cmd_payload_t'(19'($urandom));
      p.sync = 0; p.addr_valid = 0; p.convert = ($urandom % 4 != 0);
      if (p.convert) nconv++;
      sent.push_back(p);
      send_word(p);
    end
    // poll for another address: no answer
    p = '0; p.convert = 1; p.addr_valid = 1; p.addr = 8'h22;
    send_word(p);
    chk(got.size() - n0 == 30, "every word delivered");
    for (int i = 0; i < 30 && n0 + i < got.size(); i++) chk(19'(got[n0 + i]) == 19'(sent[i]), "payload in order");
    chk(convert_count == 16'(nconv), "CONVERT count");
    nconv++;
    chk(ph_n > 1000 && ph_bad == 0, "50 MHz clock in phase with the bit cell");
    for (int i = 0; i < 6; i++) begin p = '0; p.convert = 1; nconv++; send_word(p); end
    chk(oe_cycles == 0, "no answer to another address");
    // poll for this address: burst of five words with the count
    p = '0; p.convert = 1; p.addr_valid = 1; p.addr = 8'h21; nconv++;
    send_word(p);
    for (int i = 0; i < 7; i++) begin p = '0; p.convert = 1; send_word(p); end
    chk(!ret_oe, "driver off after the burst");
    chk(oe_cycles == 5 * 50, "burst of five words");
    chk(rwords.size() == 5 && rbad == 0, "well-formed return words");
    foreach (rwords[i]) chk(rwords[i][18:3] == 16'(nconv) && rwords[i][2], "echoed CONVERT count");
    chk(viol_count == 0 && word_err_count == 0, "no errors on a clean line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
