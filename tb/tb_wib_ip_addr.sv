// tb_wib_ip_addr: every crate and slot combination gives the expected
// address, addresses of the five valid slots of a crate are unique, and slots
// 0, 6 and 7 are flagged invalid.
module tb_wib_ip_addr;
  logic clk = 0, rst = 1;
  logic [7:0] crate = '0;
  logic [2:0] slot = '0;
  logic [31:0] ip;
  logic ip_valid;
  int checks = 0, failures = 0;
  wib_ip_addr dut (.*);
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
    repeat (3) @(negedge clk);
    rst = 0;
    for (int c = 0; c < 256; c += 17) begin
      logic [31:0] seen[$];
      for (int s = 0; s < 8; s++) begin
        crate = 8'(c); slot = 3'(s);
        @(negedge clk);
        chk(ip_valid == (s >= 1 && s <= 5), "slot validity");
        chk(ip[31:24] == 8'd192 && ip[23:16] == 8'd168 && ip[15:8] == 8'(c) && ip[7:0] == 8'(s),
            "address = 192.168.crate.slot");
        if (ip_valid) begin
          foreach (seen[i]) chk(seen[i] != ip, "unique in crate");
          seen.push_back(ip);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
