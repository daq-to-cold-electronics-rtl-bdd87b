// cmd_word_tx: serializer of the 25-bit sync/command word.
//
// Words are sent back to back, most significant bit first, one bit per bit
// slot of the line encoder (bit_req). With a 50 Mb/s bit rate a word takes
// 500 ns, which is the cadence of the CONVERT command. In the slot that takes
// the last bit of a word the serializer loads the next payload from
// payload_in and pulses load; whoever drives payload_in must present the next
// word's content there and treat load as "consumed". The word gets the
// preamble and parity of pdts_pkg::frame_word. In reset the first word is
// preloaded from payload_in, so it is the first to go out after reset.
//
// Word length and rate follow the specification; the framing (preamble,
// parity) is this design's own choice.
module cmd_word_tx
  import pdts_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    bit_req,      // from bmc_encoder
  input  logic [PAYLOAD_BITS-1:0] payload_in,
  output logic                    load,         // payload_in taken this cycle
  output logic                    bit_out       // bit for the encoder
);
  logic [WORD_BITS-1:0] sh;
  logic [$clog2(WORD_BITS)-1:0] cnt;   // index of the bit now on bit_out

  assign bit_out = sh[WORD_BITS-1];
  assign load    = bit_req && (cnt == $bits(cnt)'(WORD_BITS-1));

  always_ff @(posedge clk) begin
    if (rst) begin
      sh  <= frame_word(payload_in);
      cnt <= '0;
    end else if (bit_req) begin
      if (cnt == $bits(cnt)'(WORD_BITS-1)) begin
        sh  <= frame_word(payload_in);
        cnt <= '0;
      end else begin
        sh  <= {sh[WORD_BITS-2:0], 1'b0};
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
