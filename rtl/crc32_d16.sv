// crc32_d16: CRC-32 register updated with one 16-bit word per cycle.
//
// Polynomial 0x04C11DB7 (the CRC-32 of Ethernet), processed most significant
// bit first, preset to all ones by clear, no final inversion. clear and en
// in the same cycle start a new CRC with that word. The frame trailer of the
// WIB-to-RCE format carries a CRC-32; the polynomial, bit order and preset
// are this design's choices, as the text names only "CRC-32".
module crc32_d16
  import pdts_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        clear,
  input  logic        en,
  input  logic [15:0] data,
  output logic [31:0] crc
);
  always_ff @(posedge clk) begin
    if (rst)        crc <= CRC_INIT;
    else if (en)    crc <= crc32_step16(clear ? CRC_INIT : crc, data);
    else if (clear) crc <= CRC_INIT;
  end
endmodule
