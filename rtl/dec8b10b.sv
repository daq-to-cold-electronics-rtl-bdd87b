// dec8b10b: 8b/10b decoder of one 10-bit code (combinational), the inverse of
// enc8b10b, with running disparity carried in and out for chaining.
//
// The 6-bit sub-block abcdei (code[9:4]) is looked up among the 32 data codes
// in both polarities and the K28 form; the 4-bit sub-block fghj (code[3:0])
// among the data codes, the alternate D.x.A7 form or, after K28, the K28.y
// forms (whose polarity follows the K28 6-bit form). code_err flags a sub-block that matches nothing; disp_err flags an
// unbalanced sub-block whose sign does not suit the running disparity.
// k is set for K28.y. Errors found here feed the link error counters of the
// RCE. Only the K28.y control characters are recognised, as in the encoder.
module dec8b10b (
  input  logic [9:0] code,
  input  logic       rd_in,
  output logic [7:0] data,
  output logic       k,
  output logic       rd_out,
  output logic       code_err,
  output logic       disp_err
);
  // the encoder's tables, for negative running disparity
  function automatic logic [5:0] t6(input logic [4:0] x);
    case (x)
      5'd0:  t6 = 6'b100111;  5'd1:  t6 = 6'b011101;  5'd2:  t6 = 6'b101101;
      5'd3:  t6 = 6'b110001;  5'd4:  t6 = 6'b110101;  5'd5:  t6 = 6'b101001;
      5'd6:  t6 = 6'b011001;  5'd7:  t6 = 6'b111000;  5'd8:  t6 = 6'b111001;
      5'd9:  t6 = 6'b100101;  5'd10: t6 = 6'b010101;  5'd11: t6 = 6'b110100;
      5'd12: t6 = 6'b001101;  5'd13: t6 = 6'b101100;  5'd14: t6 = 6'b011100;
      5'd15: t6 = 6'b010111;  5'd16: t6 = 6'b011011;  5'd17: t6 = 6'b100011;
      5'd18: t6 = 6'b010011;  5'd19: t6 = 6'b110010;  5'd20: t6 = 6'b001011;
      5'd21: t6 = 6'b101010;  5'd22: t6 = 6'b011010;  5'd23: t6 = 6'b111010;
      5'd24: t6 = 6'b110011;  5'd25: t6 = 6'b100110;  5'd26: t6 = 6'b010110;
      5'd27: t6 = 6'b110110;  5'd28: t6 = 6'b001110;  5'd29: t6 = 6'b101110;
      5'd30: t6 = 6'b011110;  default: t6 = 6'b101011;
    endcase
  endfunction

  function automatic logic [3:0] t4(input logic [2:0] y);
    case (y)
      3'd0: t4 = 4'b1011;  3'd1: t4 = 4'b1001;  3'd2: t4 = 4'b0101;
      3'd3: t4 = 4'b1100;  3'd4: t4 = 4'b1101;  3'd5: t4 = 4'b1010;
      3'd6: t4 = 4'b0110;  default: t4 = 4'b1110;
    endcase
  endfunction

  function automatic logic [3:0] k4(input logic [2:0] y);
    case (y)
      3'd0: k4 = 4'b1011;  3'd1: k4 = 4'b0110;  3'd2: k4 = 4'b1010;
      3'd3: k4 = 4'b1100;  3'd4: k4 = 4'b1101;  3'd5: k4 = 4'b0101;
      3'd6: k4 = 4'b1001;  default: k4 = 4'b0111;
    endcase
  endfunction

  logic [5:0] c6;
  logic [3:0] c4;
  logic [4:0] x;
  logic [2:0] y;
  logic hit6, hit4, rd_mid;
  int n6, n4;

  always_comb begin
    c6 = code[9:4];
    c4 = code[3:0];
    x = '0; y = '0; hit6 = 1'b0; hit4 = 1'b0; k = 1'b0;
    // 6-bit sub-block
    if (c6 == 6'b001111 || c6 == 6'b110000) begin
      k = 1'b1; x = 5'd28; hit6 = 1'b1;
    end else begin
      for (int i = 0; i < 32; i++) begin
        if (c6 == t6(5'(i)) ||
            (c6 == ~t6(5'(i)) && ($countones(t6(5'(i))) != 3 || i == 7))) begin
          x = 5'(i); hit6 = 1'b1;
        end
      end
    end
    // 4-bit sub-block
    for (int j = 0; j < 8; j++) begin
      if (k) begin
        // after 001111 the disparity is positive and the K28 form is inverted
        if (c4 == ((c6 == 6'b001111) ? ~k4(3'(j)) : k4(3'(j)))) begin y = 3'(j); hit4 = 1'b1; end
      end else if (c4 == t4(3'(j)) ||
                   (c4 == ~t4(3'(j)) && ($countones(t4(3'(j))) != 2 || j == 3))) begin
        y = 3'(j); hit4 = 1'b1;
      end
    end
    if (!k && (c4 == 4'b0111 || c4 == 4'b1000)) begin y = 3'd7; hit4 = 1'b1; end
    code_err = !(hit6 && hit4);
    // running disparity
    n6 = $countones(c6);
    n4 = $countones(c4);
    disp_err = 1'b0;
    rd_mid = rd_in;
    if (n6 > 3)      begin if (rd_in)  disp_err = 1'b1; rd_mid = 1'b1; end
    else if (n6 < 3) begin if (!rd_in) disp_err = 1'b1; rd_mid = 1'b0; end
    rd_out = rd_mid;
    if (n4 > 2)      begin if (rd_mid)  disp_err = 1'b1; rd_out = 1'b1; end
    else if (n4 < 2) begin if (!rd_mid) disp_err = 1'b1; rd_out = 1'b0; end
    data = {y, x};
  end
endmodule
