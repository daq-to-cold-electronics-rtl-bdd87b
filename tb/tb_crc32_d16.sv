// tb_crc32_d16: the testbench's own bit-serial CRC-32 (polynomial
// 0x04C11DB7, preset all ones, MSB first) is first checked against the
// published CRC-32/MPEG-2 check value of "123456789" (0x0376E6E7), then the
// block is compared with it over random 16-bit word sequences, with clear.
module tb_crc32_d16;
  logic clk = 0, rst = 1, clear = 0, en = 0;
  logic [15:0] data = '0;
  logic [31:0] crc;
  int checks = 0, failures = 0;
  crc32_d16 dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [31:0] ref_bit(input logic [31:0] c, input logic b);
    logic fb;
    fb = c[31] ^ b;
    c = c << 1;
    if (fb) c = c ^ 32'h04C11DB7;
    return c;
  endfunction

  initial begin
    #200000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] r;
    byte s[9] = '{"1","2","3","4","5","6","7","8","9"};
    r = 32'hFFFFFFFF;
    foreach (s[i]) for (int b = 7; b >= 0; b--) r = ref_bit(r, s[i][b]);
    chk(r == 32'h0376E6E7, "reference model check value");
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    chk(crc == 32'hFFFFFFFF, "preset");
    for (int f = 0; f < 20; f++) begin
      r = 32'hFFFFFFFF;
      for (int i = 0; i < 1 + $urandom % 60; i++) begin
        data = 16'($urandom); en = 1; clear = (i == 0);
        for (int b = 15; b >= 0; b--) r = ref_bit(r, data[b]);
        @(negedge clk);
        // idle cycles in between keep the value
        en = 0; clear = 0;
        if ($urandom % 3 == 0) @(negedge clk);
      end
      chk(crc == r, "CRC over a word sequence");
    end
    clear = 1; @(negedge clk); clear = 0;
    chk(crc == 32'hFFFFFFFF, "clear alone presets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
