// tb_enc8b10b: known code words of the 8b/10b standard, then for all 256
// data bytes in both disparities: code disparity 0 or +-2 with the sign the
// running disparity requires, the running disparity update, one-to-one
// mapping, and a run length of at most 5 over a long random chained stream.
module tb_enc8b10b;
  logic [7:0] data; logic k, rd_in;
  logic [9:0] code; logic rd_out;
  int checks = 0, failures = 0;
  enc8b10b dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s data=%h k=%0d rd=%0d code=%b", what, data, k, rd_in, code); end
  endtask

  task automatic known(input logic [7:0] d, input logic kk, input logic rd, input logic [9:0] exp);
    data = d; k = kk; rd_in = rd; #1;
    chk(code == exp, "standard code word");
  endtask

  initial begin
    #1000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit seen [2][1024];
    int ones, run, maxrun;
    logic last, cur_rd;
    known(8'h00, 0, 0, 10'b100111_0100);
    known(8'h4A, 0, 0, 10'b010101_0101);
    known(8'hB5, 0, 1, 10'b101010_1010);
    known(8'h23, 0, 0, 10'b110001_1001);
    known(8'hF1, 0, 0, 10'b100011_0111);
    known(8'hEB, 0, 1, 10'b110100_1000);
    known(8'hBC, 1, 0, 10'b001111_1010);
    known(8'hBC, 1, 1, 10'b110000_0101);
    known(8'h3C, 1, 0, 10'b001111_1001);
    known(8'h5C, 1, 0, 10'b001111_0101);
    known(8'h07, 0, 1, 10'b000111_0100);
    for (int r = 0; r < 2; r++) begin
      for (int d = 0; d < 256; d++) begin
        data = 8'(d); k = 0; rd_in = 1'(r); #1;
        ones = $countones(code);
        if (r == 0) chk(ones == 5 || ones == 6, "disparity at RD-");
        else        chk(ones == 5 || ones == 4, "disparity at RD+");
        chk(rd_out == ((ones == 5) ? rd_in : ~rd_in), "running disparity update");
        chk(!seen[r][code], "one-to-one");
        seen[r][code] = 1;
      end
    end
    // long random chained stream: run length <= 5
    cur_rd = 0; last = 0; run = 0; maxrun = 0;
    for (int i = 0; i < 4000; i++) begin
      data = 8'($urandom); k = ($urandom % 16 == 0); if (k) data = {3'($urandom % 8), 5'd28};
      rd_in = cur_rd; #1;
      for (int b = 9; b >= 0; b--) begin
        if (i == 0 && b == 9) begin run = 1; end
        else if (code[b] == last) run++;
        else run = 1;
        last = code[b];
        if (run > maxrun) maxrun = run;
      end
      cur_rd = rd_out;
    end
    chk(maxrun <= 5, "run length at most 5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
