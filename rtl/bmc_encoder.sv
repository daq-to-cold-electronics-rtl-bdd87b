// bmc_encoder: biphase-mark line encoder for the timing stream.
//
// The line toggles at the start of every bit cell and toggles again in the
// middle of the cell when the bit is 1, so the carrier clock can be recovered
// from the line whatever the data. The block runs on the half-cell clock
// (twice the carrier): one data bit is consumed every two cycles. bit_req is
// high in the cycle the encoder samples bit_in (the first half-cell of a
// cell); the serializer must present the next bit on bit_in in that cycle.
//
// tx_en drives line_oe: when it is low the driver is off (laser dark) and line
// is held 0, so several return-path transmitters can share one fibre. A
// transmitter that is re-enabled starts on a cell boundary.
//
// Biphase-mark coding follows the specification; the half-cell clocking, the
// driver-enable behaviour and reset values are this design's choices.
module bmc_encoder (
  input  logic clk,      // half-cell clock (100 MHz for a 50 MHz carrier)
  input  logic rst,      // synchronous, active high
  input  logic tx_en,    // driver enable
  input  logic bit_in,   // data bit, sampled when bit_req is high
  output logic bit_req,  // this cycle starts a bit cell and takes bit_in
  output logic line,     // encoded line level
  output logic line_oe   // driver enable to the optical/electrical driver
);
  logic phase;   // 0: first half-cell next, 1: second half-cell next
  logic cur_bit;

  assign bit_req = tx_en && !phase;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase   <= 1'b0;
      cur_bit <= 1'b0;
      line    <= 1'b0;
      line_oe <= 1'b0;
    end else begin
      line_oe <= tx_en;
      if (!tx_en) begin
        phase <= 1'b0;
        line  <= 1'b0;
      end else if (!phase) begin
        line    <= ~line;       // transition at every cell boundary
        cur_bit <= bit_in;
        phase   <= 1'b1;
      end else begin
        if (cur_bit) line <= ~line;  // mid-cell transition encodes a 1
        phase <= 1'b0;
      end
    end
  end
endmodule
