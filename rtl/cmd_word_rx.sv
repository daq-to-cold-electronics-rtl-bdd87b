// cmd_word_rx: deserializer and word aligner for the 25-bit command word.
//
// Decoded bits are shifted into a 25-bit window and a free-running bit
// position counts 0..24. While unaligned, each of the 25 positions has a small
// hit counter: a position whose window holds a valid word (preamble and even
// parity) counts up, otherwise its counter clears. The first position that
// sees LOCK_WORDS valid words in a row (25 bits apart) becomes the word
// boundary. Random matches inside the payload cannot disturb the search,
// because each position is tracked separately. While aligned, the window is
// checked only at the boundary: a valid word is delivered on
// word_valid/payload for one cycle, a bad one increments err_count, and
// LOSS_WORDS bad words in a row drop alignment.
// Output timing: word_valid rises in the cycle after the last bit's bit_valid.
// The alignment rules and counters are this design's choices.
module cmd_word_rx
  import pdts_pkg::*;
#(
  parameter int unsigned LOCK_WORDS = 3,
  parameter int unsigned LOSS_WORDS = 3
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    bit_valid,
  input  logic                    bit_in,
  output logic                    aligned,
  output logic                    word_valid,
  output logic [PAYLOAD_BITS-1:0] payload,
  output logic [15:0]             err_count
);
  localparam int unsigned PW = $clog2(WORD_BITS);
  localparam int unsigned HW = $clog2(LOCK_WORDS + 1);
  localparam int unsigned LW = $clog2(LOSS_WORDS + 1);

  logic [WORD_BITS-2:0] sh;
  logic [WORD_BITS-1:0] win;
  logic [PW-1:0] pos, sel;
  logic [HW-1:0] hits [WORD_BITS];
  logic [LW-1:0] bad;
  logic ok;

  assign win = {sh, bit_in};
  assign ok  = word_ok(win);

  always_ff @(posedge clk) begin
    if (rst) begin
      sh <= '0; pos <= '0; sel <= '0; bad <= '0;
      for (int i = 0; i < WORD_BITS; i++) hits[i] <= '0;
      aligned <= 1'b0; word_valid <= 1'b0; payload <= '0; err_count <= '0;
    end else begin
      word_valid <= 1'b0;
      if (bit_valid) begin
        sh  <= win[WORD_BITS-2:0];
        pos <= (pos == PW'(WORD_BITS-1)) ? '0 : pos + 1'b1;
        if (!aligned) begin
          if (!ok) begin
            hits[pos] <= '0;
          end else if (hits[pos] == HW'(LOCK_WORDS-1)) begin
            aligned <= 1'b1; sel <= pos; bad <= '0;
            word_valid <= 1'b1; payload <= win[PAYLOAD_BITS:1];
            for (int i = 0; i < WORD_BITS; i++) hits[i] <= '0;
          end else begin
            hits[pos] <= hits[pos] + 1'b1;
          end
        end else if (pos == sel) begin
          if (ok) begin
            bad <= '0;
            word_valid <= 1'b1;
            payload <= win[PAYLOAD_BITS:1];
          end else begin
            if (err_count != 16'hFFFF) err_count <= err_count + 16'd1;
            if (bad == LW'(LOSS_WORDS-1)) begin
              aligned <= 1'b0; bad <= '0;
            end else begin
              bad <= bad + 1'b1;
            end
          end
        end
      end
    end
  end

  // a word is only delivered at the word boundary while aligned
  a_valid_when_aligned: assert property (@(posedge clk) disable iff (rst)
    word_valid |-> aligned);
endmodule
