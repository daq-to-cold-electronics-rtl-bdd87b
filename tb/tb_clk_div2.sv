// tb_clk_div2: the divided clock must toggle every cycle and, once a phase
// reference (cell_start) is given, rise right after each cell start; a phase
// jump of the reference must be absorbed by one counted slip.
module tb_clk_div2;
  logic clk = 0, rst = 1, locked = 0, cell_start = 0;
  logic clk_out;
  logic [7:0] slip_count;
  int checks = 0, failures = 0;
  clk_div2 dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic prev;
    int ph;
    repeat (3) @(negedge clk);
    rst = 0;
    // unlocked: free toggling
    for (int i = 0; i < 10; i++) begin prev = clk_out; @(negedge clk); chk(clk_out != prev, "free-running toggle"); end
    // lock with cell_start on odd cycles
    locked = 1; ph = 1;
    for (int i = 0; i < 60; i++) begin
      cell_start = ((i % 2) == ph);
      @(negedge clk);
      if (i > 4) chk(clk_out == ((i % 2) == ph), "rises after cell start");
    end
    chk(slip_count <= 1, "at most one slip to acquire phase");
    // reference jumps by one cycle
    ph = 0;
    for (int i = 0; i < 60; i++) begin
      cell_start = ((i % 2) == ph);
      @(negedge clk);
      if (i > 4) chk(clk_out == ((i % 2) == ph), "re-phased after jump");
    end
    chk(slip_count >= 1 && slip_count <= 2, "slip counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
