// tb_cmd_word_tx: the serializer must send every payload as a 25-bit word
// (preamble 11010, payload, even parity), MSB first, back to back, one word
// per 25 bit slots (500 ns at 50 Mb/s = 50 half-cell cycles).
module tb_cmd_word_tx;
  logic clk = 0, rst = 1, bit_req = 0;
  logic [18:0] payload_in = '0;
  logic load, bit_out;
  int checks = 0, failures = 0;
  cmd_word_tx dut (.*);
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

  initial begin
    #300000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [18:0] cur;
    logic [24:0] rx;
    int cyc, last_load;
    cur = 19'h5A5A5;
    payload_in = cur;
    repeat (3) @(negedge clk);
    rst = 0;                // first word is the one preloaded in reset
    cyc = 0; last_load = -1;
    for (int w = 0; w < 30; w++) begin
      rx = '0;
      for (int b = 0; b < 25; b++) begin
        @(negedge clk); bit_req = 1; #1;
        rx = {rx[23:0], bit_out};
        if (b == 24) begin
          chk(load, "load on last bit");
          if (w > 0) chk(cyc - last_load == 50, "word every 50 cycles");
          last_load = cyc;
        end else begin
          chk(!load, "no load mid-word");
        end
        // next payload presented when the word is loaded
        if (b == 24) begin
          chk(rx == ref_word(cur), "word content");
          cur = 19'($urandom);
          payload_in = cur;
        end
        @(negedge clk); bit_req = 0; cyc += 2;
        // payload_in must be held only at the load cycle: scramble it
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
