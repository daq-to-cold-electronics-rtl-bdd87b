// tb_dec8b10b: decodes known standard code words, every data byte and the
// K28.y characters in both disparities as produced by the encoder (round
// trip, no errors), and checks that invalid codes raise code_err and a code
// of the wrong disparity raises disp_err.
module tb_dec8b10b;
  logic [9:0] code; logic rd_in;
  logic [7:0] data; logic k, rd_out, code_err, disp_err;
  logic [7:0] e_data; logic e_k, e_rd;
  logic [9:0] e_code; logic e_rd_out;
  int checks = 0, failures = 0;
  dec8b10b dut (.*);
  enc8b10b u_ref (.data(e_data), .k(e_k), .rd_in(e_rd), .code(e_code), .rd_out(e_rd_out));

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s code=%b data=%h k=%0d", what, code, data, k); end
  endtask

  initial begin
    #1000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // known words
    code = 10'b001111_1010; rd_in = 0; #1;
    chk(k && data == 8'hBC && !code_err && !disp_err && rd_out == 1, "K28.5 RD-");
    code = 10'b110000_0101; rd_in = 1; #1;
    chk(k && data == 8'hBC && !code_err && !disp_err && rd_out == 0, "K28.5 RD+");
    code = 10'b100011_0111; rd_in = 0; #1;
    chk(!k && data == 8'hF1 && !code_err, "D17.7 (A7)");
    code = 10'b010101_0101; rd_in = 1; #1;
    chk(!k && data == 8'h4A && !code_err && !disp_err && rd_out == 1, "D10.2");
    // round trip
    for (int r = 0; r < 2; r++) begin
      for (int d = 0; d < 256 + 8; d++) begin
        e_rd = 1'(r);
        if (d < 256) begin e_data = 8'(d); e_k = 0; end
        else begin e_data = {3'(d - 256), 5'd28}; e_k = 1; end
        #1;
        code = e_code; rd_in = e_rd; #1;
        chk(data == e_data && k == e_k && !code_err && !disp_err && rd_out == e_rd_out, "round trip");
      end
    end
    // invalid codes
    code = 10'b0000000000; rd_in = 0; #1; chk(code_err, "all zeros invalid");
    code = 10'b1111111111; rd_in = 0; #1; chk(code_err, "all ones invalid");
    code = 10'b111100_1010; rd_in = 0; #1; chk(code_err, "111100 invalid 6b");
    code = 10'b100111_1111; rd_in = 0; #1; chk(code_err, "1111 invalid 4b");
    // wrong disparity: D0.0 RD- form received at RD+
    code = 10'b100111_0100; rd_in = 1; #1; chk(disp_err, "disparity error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
