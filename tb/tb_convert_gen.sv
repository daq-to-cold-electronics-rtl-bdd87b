// tb_convert_gen: command words every 50 cycles (500 ns at 100 MHz). Checks
// the 2 MHz CONVERT clock (rising edge right after each CONVERT word, 25
// cycles high, 50-cycle period), no edge without CONVERT, the command
// pulses, and the CONVERT and reset counters, also for a random on/off
// CONVERT sequence.
module tb_convert_gen;
  import pdts_pkg::*;
  logic clk = 0, rst = 1, cmd_valid = 0;
  cmd_payload_t cmd = '0;
  logic convert_clk, calibrate, sync, coldata_reset, convert_evt, sync_evt;
  logic [15:0] convert_count;
  logic [23:0] reset_count;
  int checks = 0, failures = 0;
  convert_gen dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #300000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int rises = 0, hi = 0, last_rise = -1, cyc = 0, bad_period = 0;
  logic cc_q = 0;
  always @(posedge clk) begin
    cyc++;
    if (!rst && convert_clk && !cc_q) begin
      if (last_rise >= 0 && cyc - last_rise != 50) bad_period++;
      last_rise = cyc; rises++;
    end
    if (!rst && convert_clk) hi++;
    cc_q = convert_clk;
  end

  task automatic word(input logic conv, input logic cal, input logic syn, input logic crst);
    @(negedge clk);
    cmd = '0; cmd.convert = conv; cmd.calibrate = cal; cmd.sync = syn; cmd.coldata_reset = crst;
    cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    repeat (48) @(negedge clk);
  endtask

  initial begin
    int r0, h0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 20; i++) begin
      word(1, 0, 0, 0);
      chk(convert_count == 16'(i + 1), "count follows each CONVERT");
    end
    chk(rises == 20 && bad_period == 0, "one rising edge per CONVERT, 500 ns period");
    chk(hi == 20 * 25, "25 cycles high");
    chk(convert_count == 16'd20, "convert count");
    // no CONVERT: clock idle
    r0 = rises;
    for (int i = 0; i < 4; i++) word(0, 0, 0, 0);
    chk(rises == r0 && convert_clk == 0, "no edge without CONVERT");
    chk(convert_count == 16'd20, "count holds");
    // SYNC with CONVERT: count restarts at 1, reset count increments
    @(negedge clk);
    cmd = '0; cmd.convert = 1; cmd.sync = 1; cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    chk(sync && convert_evt && sync_evt, "sync pulse and strobes");
    chk(convert_count == 16'd1 && reset_count == 24'd1, "counts after SYNC");
    repeat (4) @(negedge clk);
    chk(!sync, "sync pulse length 4");
    word(0, 1, 0, 0);
    word(0, 0, 0, 1);
    @(negedge clk);
    cmd = '0; cmd.calibrate = 1; cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    chk(calibrate && !coldata_reset && !convert_evt, "calibrate pulse only");
    @(negedge clk);
    cmd = '0; cmd.coldata_reset = 1; cmd_valid = 1;
    @(negedge clk); cmd_valid = 0;
    chk(coldata_reset, "reset pulse");
    // random CONVERT on/off: one edge and one count per CONVERT word
    begin
      int nc, re0, ncw; logic c;
      repeat (10) @(negedge clk);
      nc = convert_count; re0 = rises; ncw = 0;
      for (int i = 0; i < 40; i++) begin
        c = 1'($urandom);
        word(c, 0, 0, 0);
        nc += c; ncw += c;
        chk(convert_count == 16'(nc), "count of random CONVERT words");
      end
      chk(rises - re0 == ncw, "one rising edge per random CONVERT word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
