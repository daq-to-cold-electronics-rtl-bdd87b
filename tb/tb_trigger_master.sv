// tb_trigger_master: spill gating, pile-up veto, hand-off of one trigger per
// command word with its partition, loss of a second trigger in one word,
// calibration triggers outside the spill, SET gating and both backpressure
// throttles (busy lines, outstanding-trigger credit).
module tb_trigger_master;
  logic clk = 0, rst = 1;
  logic spill_start = 0, spill_end = 0, beam_trig = 0, set_enable = 0, calib_en = 0;
  logic [15:0] veto_cycles = 16'd10, max_outstanding = 16'd4;
  logic [23:0] calib_period = 24'd200;
  logic [1:0] beam_part = 2'd1, calib_part = 2'd2;
  logic [7:0] busy_in = '0;
  logic evt_done = 0, word_load = 0;
  logic trig_pending, trig_calib, in_spill, set_eff;
  logic [1:0] trig_part;
  logic [15:0] outstanding;
  logic [31:0] n_sent, n_vetoed, n_inhibited, n_lost, n_calib;
  int checks = 0, failures = 0;
  trigger_master dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #400000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // command words every 50 cycles; record what they carry
  int cyc = 0, w_beam = 0, w_calib = 0, w_badpart = 0;
  always @(posedge clk) begin
    cyc++;
    if (word_load && trig_pending) begin
      if (trig_calib) begin w_calib++; if (trig_part != 2'd2) w_badpart++; end
      else            begin w_beam++;  if (trig_part != 2'd1) w_badpart++; end
    end
  end
  always @(negedge clk) word_load = !rst && (cyc % 50 == 0);

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  task automatic wait_cycles(input int n); repeat (n) @(negedge clk); endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    // beam trigger before the spill: ignored
    pulse(beam_trig); wait_cycles(60);
    chk(n_sent == 0 && !trig_pending, "no beam trigger outside spill");
    set_enable = 1;
    pulse(spill_start);
    chk(in_spill, "in spill");
    // a trigger; a second 5 cycles later is vetoed (pile-up)
    pulse(beam_trig); wait_cycles(4); pulse(beam_trig);
    wait_cycles(60);
    chk(n_vetoed == 1 && n_sent == 1 && w_beam == 1, "pile-up veto");
    // two triggers 20 cycles apart, well apart for the veto, within one word
    wait_cycles((50 - (cyc % 50)) + 5);
    pulse(beam_trig); wait_cycles(19); pulse(beam_trig);
    wait_cycles(60);
    chk(n_lost == 1 && n_sent == 2, "second trigger in one word lost");
    // credit: outstanding = 2; two more reach the limit of 4
    pulse(beam_trig); wait_cycles(60); pulse(beam_trig); wait_cycles(60);
    chk(outstanding == 4 && !set_eff, "credit exhausted throttles SET");
    pulse(beam_trig); wait_cycles(60);
    chk(n_inhibited == 1 && n_sent == 4, "trigger inhibited by credit");
    pulse(evt_done); pulse(evt_done);
    chk(outstanding == 2 && set_eff, "credit returned by evt_done");
    // busy line from one COB
    busy_in[5] = 1; #1;
    chk(!set_eff, "busy throttles SET");
    pulse(beam_trig); wait_cycles(60);
    chk(n_inhibited == 2, "trigger inhibited by busy");
    busy_in = '0;
    // software SET removed
    set_enable = 0;
    pulse(beam_trig); wait_cycles(60);
    chk(n_inhibited == 3 && n_sent == 4, "SET off blocks triggers");
    set_enable = 1;
    pulse(evt_done); pulse(evt_done);
    // out of spill: calibration triggers every 200 cycles
    pulse(spill_end);
    chk(!in_spill, "spill ended");
    calib_en = 1;
    wait_cycles(1010);
    chk(n_calib >= 4 && n_calib <= 5, "calibration triggers at the period");
    chk(w_calib == n_calib && w_beam == 4 && w_badpart == 0, "partition tags on the words");
    calib_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
