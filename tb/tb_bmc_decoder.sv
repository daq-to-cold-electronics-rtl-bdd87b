// tb_bmc_decoder: feeds a biphase-mark line built by the testbench itself
// (starting at an arbitrary half-cell phase) and checks lock, the decoded
// bit sequence bit by bit, the cell_start spacing, code-violation counting,
// loss of lock on a dark line, and relock at the other half-cell phase.
module tb_bmc_decoder;
  logic clk = 0, rst = 1, line_in = 0;
  logic bit_valid, bit_out, cell_start, locked;
  logic [15:0] viol_count;
  int checks = 0, failures = 0;
  bmc_decoder #(.LOCK_CELLS(16), .LOSS_CELLS(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #400000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // reference: bits sent and bits received
  logic sent[$];
  logic got[$];
  always @(posedge clk) if (!rst && bit_valid) got.push_back(bit_out);
  // while locked on a clean line, cell_start comes every second cycle
  int cs_bad = 0; logic cs_q = 0; logic mon = 0;
  always @(posedge clk) begin
    if (mon && locked && cell_start == cs_q) cs_bad++;
    cs_q <= cell_start;
  end

  task automatic send_bit(input logic b, input logic viol = 0);
    @(negedge clk); if (!viol) line_in = ~line_in;
    @(negedge clk); if (b) line_in = ~line_in;
  endtask

  initial begin
    int n, off, match, best;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);       // odd offset: boundary phase differs from reset guess
    for (int i = 0; i < 40; i++) send_bit(1'($urandom % 3 == 0));
    chk(locked, "locked after preamble bits");
    got.delete();
    mon = 1;
    for (int i = 0; i < 300; i++) begin
      logic b; b = 1'($urandom);
      sent.push_back(b);
      send_bit(b);
    end
    send_bit(0); send_bit(0);
    // the decoded stream must contain the sent stream (allowing a few bits
    // of pipeline before the first recorded bit)
    // find the pipeline offset, then compare every bit on its own
    best = 0; n = 0;
    for (off = 0; off < 4; off++) begin
      match = 0;
      for (int i = 0; i + off < got.size() && i < sent.size(); i++)
        if (got[i + off] == sent[i]) match++;
      if (match > best) begin best = match; n = off; end
    end
    for (int i = 0; i < sent.size(); i++)
      chk(i + n < got.size() && got[i + n] == sent[i], "decoded bit equals sent bit");
    chk(got.size() >= 299 && got.size() <= 304, "one bit per cell");
    chk(viol_count == 0, "no violations on a clean line");
    mon = 0;
    chk(cs_bad == 0, "cell_start every second cycle");
    // violations: two cells without boundary transition
    send_bit(0, 1);
    send_bit(1);
    send_bit(0, 1);
    for (int i = 0; i < 4; i++) send_bit(1'($urandom));
    chk(viol_count >= 2, "violations counted");
    chk(locked, "still locked after isolated violations");
    // dark line: lock is lost
    repeat (40) @(negedge clk);
    chk(!locked, "lock lost on a dark line");
    // relock with the other half-cell phase and decode again
    @(negedge clk);
    for (int i = 0; i < 40; i++) send_bit(1'($urandom));
    chk(locked, "relocked at the other phase");
    got.delete(); sent.delete();
    for (int i = 0; i < 100; i++) begin
      logic b; b = 1'($urandom);
      sent.push_back(b);
      send_bit(b);
    end
    send_bit(0); send_bit(0);
    for (int i = 0; i < sent.size(); i++)
      chk(i + n < got.size() && got[i + n] == sent[i], "bit decoded after relock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
