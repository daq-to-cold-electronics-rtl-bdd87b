// tb_sync_fifo: random writes and reads against a queue model: data order,
// count, full/empty flags, ignored writes when full and the overflow count.
module tb_sync_fifo;
  logic clk = 0, rst = 1, wr_en = 0, rd_en = 0;
  logic [16:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [4:0] count;
  logic [15:0] overflow_count;
  int checks = 0, failures = 0;
  sync_fifo #(.WIDTH(17), .DEPTH(16)) dut (.*);
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
    logic [16:0] q[$];
    int ovf = 0;
    logic w, r;
    logic [16:0] d;
    repeat (3) @(negedge clk);
    rst = 0;
    @(negedge clk);
    chk(empty && count == 0, "empty after reset");
    for (int i = 0; i < 2000; i++) begin
      // phase 1 fills, phase 2 random, phase 3 drains
      wr_en = (i < 700) ? ($urandom % 4 != 0) : (i < 1400) ? 1'($urandom) : 0;
      rd_en = (i < 700) ? ($urandom % 4 == 0) : (i < 1400) ? 1'($urandom) : 1;
      rd_en = rd_en && (q.size() != 0);
      wr_data = 17'($urandom);
      #1;
      chk(count == q.size() && full == (q.size() == 16) && empty == (q.size() == 0), "count and flags");
      if (rd_en) chk(rd_data == q[0], "data order");
      w = wr_en; r = rd_en; d = wr_data;
      @(posedge clk);
      // a write to a full buffer is dropped, even with a read in the same cycle
      if (w && q.size() == 16) begin ovf++; w = 0; end
      if (r) void'(q.pop_front());
      if (w) q.push_back(d);
      @(negedge clk);
    end
    chk(overflow_count == 16'(ovf) && ovf > 0, "overflow counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
