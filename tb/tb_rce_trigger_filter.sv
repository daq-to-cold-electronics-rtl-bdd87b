// tb_rce_trigger_filter: triggers of all four partitions arrive; only those
// of the configured partition come out, with their calibration flag, and
// the counters add up. Reconfiguration and the enable bit are checked.
module tb_rce_trigger_filter;
  import pdts_pkg::*;
  logic clk = 0, rst = 1, cfg_we = 0, cfg_enable = 0, cmd_valid = 0;
  logic [1:0] cfg_part = '0, part_reg;
  cmd_payload_t cmd = '0;
  logic trig_out, trig_calib;
  logic [31:0] n_accepted, n_ignored;
  int checks = 0, failures = 0;
  rce_trigger_filter dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int exp_acc = 0, exp_ign = 0;
    logic [1:0] p; logic c, t;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int phase = 0; phase < 3; phase++) begin
      @(negedge clk);
      cfg_we = 1; cfg_part = (phase == 0) ? 2'd3 : 2'd1; cfg_enable = (phase != 2);
      @(negedge clk); cfg_we = 0;
      chk(part_reg == cfg_part, "partition register");
      for (int i = 0; i < 100; i++) begin
        p = 2'($urandom); c = 1'($urandom); t = ($urandom % 3 != 0);
        cmd = '0; cmd.convert = 1; cmd.trig = t; cmd.trig_part = p; cmd.trig_calib = c;
        cmd_valid = 1;
        @(negedge clk); cmd_valid = 0;
        if (t) begin
          if (cfg_enable && p == cfg_part) begin
            exp_acc++;
            chk(trig_out && trig_calib == c, "own partition passes");
          end else begin
            exp_ign++;
            chk(!trig_out, "other partition blocked");
          end
        end else chk(!trig_out, "no trigger, no output");
        @(negedge clk);
      end
    end
    chk(n_accepted == 32'(exp_acc) && n_ignored == 32'(exp_ign), "counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
