// enc8b10b: 8b/10b encoder of one byte (combinational) with running
// disparity carried in and out, so that several encoders can be chained
// within one clock cycle (two for a 16-bit link word).
//
// data = HGFEDCBA; the 5 low bits are mapped to a 6-bit sub-block abcdei and
// the 3 high bits to a 4-bit sub-block fghj. Codes are written for negative
// running disparity and complemented when the disparity is positive and the
// sub-block is unbalanced (or is one of the two balanced codes that have a
// complementary form, D.07 and D.x.3). D.x.7 uses the alternate A7 form where
// the standard requires it. Only the K28.y control characters are produced
// (k = 1 forces the K28 6-bit form). code[9] is bit a, the first sent.
// 8b/10b coding is what the specification applies on the WIB links; the
// restriction to K28.y is this design's choice.
module enc8b10b (
  input  logic [7:0] data,
  input  logic       k,
  input  logic       rd_in,    // 0: negative, 1: positive running disparity
  output logic [9:0] code,
  output logic       rd_out
);
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

  // K28.y 4-bit sub-blocks for negative disparity at the sub-block start
  function automatic logic [3:0] k4(input logic [2:0] y);
    case (y)
      3'd0: k4 = 4'b1011;  3'd1: k4 = 4'b0110;  3'd2: k4 = 4'b1010;
      3'd3: k4 = 4'b1100;  3'd4: k4 = 4'b1101;  3'd5: k4 = 4'b0101;
      3'd6: k4 = 4'b1001;  default: k4 = 4'b0111;
    endcase
  endfunction

  function automatic logic unbal6(input logic [5:0] c);
    return ($countones(c) != 3);
  endfunction

  logic [4:0] x;
  logic [2:0] y;
  logic [5:0] c6n, c6;
  logic [3:0] c4n, c4;
  logic rd_mid;

  always_comb begin
    x = data[4:0];
    y = data[7:5];
    // 6-bit sub-block
    c6n = k ? 6'b001111 : t6(x);
    if (rd_in && (unbal6(c6n) || (!k && x == 5'd7))) c6 = ~c6n;
    else                                             c6 = c6n;
    rd_mid = unbal6(c6n) ? ~rd_in : rd_in;
    // 4-bit sub-block
    if (k) begin
      c4n = k4(y);
      c4  = rd_mid ? ~c4n : c4n;
    end else begin
      c4n = t4(y);
      if (y == 3'd7 && ((!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
                        ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14))))
        c4n = 4'b0111;
      if (rd_mid && (($countones(c4n) != 2) || y == 3'd3)) c4 = ~c4n;
      else                                                 c4 = c4n;
    end
    rd_out = ($countones(c4n) != 2) ? ~rd_mid : rd_mid;
    code = {c6, c4};
  end
endmodule
