// tb_bmc_encoder: checks the biphase-mark rule on the encoder's line output:
// a transition at the start of every bit cell, and a mid-cell transition
// exactly for 1 bits; one bit taken every two cycles; driver off when
// tx_en is low.
module tb_bmc_encoder;
  logic clk = 0, rst = 1, tx_en = 0, bit_in = 0;
  logic bit_req, line, line_oe;
  int checks = 0, failures = 0;
  bmc_encoder dut (.*);
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
    logic prev, b, l1, l2;
    int nreq;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    @(negedge clk);
    chk(line == 0 && line_oe == 0 && bit_req == 0, "dark while disabled");
    tx_en = 1; #1;
    for (int i = 0; i < 400; i++) begin
      // negedge: bit_req must be high now (cell start)
      chk(bit_req, "bit_req at cell start");
      b = 1'($urandom);
      bit_in = b;
      prev = line;
      @(negedge clk);
      l1 = line;
      chk(!bit_req, "no bit_req mid-cell");
      chk(l1 == ~prev, "boundary transition");
      @(negedge clk);
      l2 = line;
      chk(l2 == (l1 ^ b), "mid-cell transition encodes bit");
      chk(line_oe, "driver on");
    end
    // rate: exactly one request every two cycles
    nreq = 0;
    repeat (100) begin @(negedge clk); if (bit_req) nreq++; end
    chk(nreq == 50, "one bit per two half-cells");
    tx_en = 0;
    @(negedge clk); @(negedge clk);
    chk(line_oe == 0 && line == 0, "driver off after disable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
