// pdts_pkg: types and constants shared by the timing-distribution and
// WIB-to-RCE data-link blocks.
//
// Timing stream: a 50 MHz carrier, biphase-mark encoded, carries one data bit
// per carrier period (two line half-cells). In this RTL the timing logic runs on
// a 100 MHz half-cell clock, so one data bit takes two clock cycles and one
// 25-bit command word takes 50 cycles = 500 ns, the word cadence of the
// sync/command protocol. The 25-bit word layout is this design's own choice
// (the protocol was still open when the system was specified):
//   [24:20] preamble 5'b11010   [19:1] payload   [0] even parity over [24:1]
// Downstream payload: [18] CONVERT [17] CALIBRATE [16] SYNC [15] COLDATA_RESET
//   [14] trigger [13:12] trigger partition [11] trigger type (1 = calibration)
//   [10] addressed byte valid [9:2] addressed byte (poll address) [1:0] reserved
// Return payload: [18:3] echoed CONVERT count [2] word aligned [1:0] reserved
//
// Data link: 16-bit words, two 8b/10b bytes per word, one word per 250 MHz
// link clock (5 Gbps). One frame of FRAME_WORDS words is sent per CONVERT
// (every 500 ns = 125 word slots); the remaining slots carry idle words.
package pdts_pkg;

  localparam int unsigned WORD_BITS    = 25;
  localparam int unsigned PAYLOAD_BITS = 19;
  localparam logic [4:0]  PREAMBLE     = 5'b11010;

  // Downstream command payload
  typedef struct packed {
    logic       convert;
    logic       calibrate;
    logic       sync;
    logic       coldata_reset;
    logic       trig;
    logic [1:0] trig_part;
    logic       trig_calib;
    logic       addr_valid;
    logic [7:0] addr;
    logic [1:0] rsvd;
  } cmd_payload_t;

  // Return-path payload
  typedef struct packed {
    logic [15:0] convert_count;
    logic        aligned;
    logic [1:0]  rsvd;
  } ret_payload_t;

  function automatic logic [WORD_BITS-1:0] frame_word(input logic [PAYLOAD_BITS-1:0] pl);
    logic [WORD_BITS-2:0] body;
    body = {PREAMBLE, pl};
    return {body, ^body};
  endfunction

  function automatic logic word_ok(input logic [WORD_BITS-1:0] w);
    return (w[24:20] == PREAMBLE) && (^w == 1'b0);
  endfunction

  // 8b/10b control characters used on the data link (K28.x)
  localparam logic [7:0] K28_1 = 8'h3C;
  localparam logic [7:0] K28_2 = 8'h5C;
  localparam logic [7:0] K28_5 = 8'hBC;

  // WIB-to-RCE frame geometry (row numbers of the frame table)
  localparam int unsigned HDR_WORDS   = 7;    // rows 0..6
  localparam int unsigned CDH_WORDS   = 2;    // WIB header per COLDATA block
  localparam int unsigned CD_WORDS    = 55;   // unaltered COLDATA block
  localparam int unsigned CRC_WORDS   = 2;    // rows 121, 122
  localparam int unsigned FRAME_WORDS = HDR_WORDS + 2*(CDH_WORDS+CD_WORDS) + CRC_WORDS; // 123
  localparam logic [7:0]  FRAME_VERSION = 8'h01;

  // CRC-32, polynomial 0x04C11DB7, MSB first, 16 bits per step
  localparam logic [31:0] CRC_POLY = 32'h04C11DB7;
  localparam logic [31:0] CRC_INIT = 32'hFFFFFFFF;

  function automatic logic [31:0] crc32_step16(input logic [31:0] c, input logic [15:0] d);
    logic [31:0] r;
    r = c;
    for (int i = 15; i >= 0; i--) begin
      r = (r[31] ^ d[i]) ? ((r << 1) ^ CRC_POLY) : (r << 1);
    end
    return r;
  endfunction

endpackage
