// wib_frame_tx: framer of one WIB-to-RCE data link (one FEMB per link).
//
// For every CONVERT received from the timing system the framer sends one
// frame of 123 16-bit words, then idle words {K28.2, K28.1} until the next
// CONVERT; with no CONVERT the link carries only idle words. At 250 MHz and
// 5 Gbps a CONVERT period of 500 ns has 125 word slots, so a frame plus two
// idles fill it. Frame rows (row: content):
//   0      {crate[4:0], slot[2:0]} | K28.5 (low byte, comma, sent first)
//   1      {reset_count[7:0], version[3:0], 2'b00, link[1:0]}
//   2      reset_count[23:8]          3  CONVERT count
//   4      error bits                 5,6  WIB timestamp [15:0], [31:16]
//   7, 8   WIB header of COLDATA block 1 (flags, reserved)
//   9-63   COLDATA block 1, 55 words, passed on unaltered
//   64,65  WIB header of COLDATA block 2
//   66-120 COLDATA block 2, 55 words, unaltered
//   121,122 CRC-32 [15:0], [31:16] over rows 1..120 (crc32_d16)
// The COLDATA words come from a buffer (sync_fifo, {start flag, word}); a
// frame is sent only if both blocks are buffered, otherwise the slot stays
// idle and "missing data" is flagged. In test mode an incrementing 16-bit
// pattern replaces the COLDATA words (no FEMB needed).
// Error checks, reported in the header of the next frame and counted in
// err_count: the checksum word that opens each COLDATA block ({ChkSm B,
// ChkSm A}, byte sums of the block's other words), a block that does not
// start with a start flag, a CONVERT with no data buffered, and a CONVERT
// while a frame is still being sent (overrun).
// The WIB timestamp counts at 125 MHz (every second link clock) and is
// cleared by SYNC. Each word is 8b/10b encoded low byte first (two chained
// enc8b10b) and registered: link_code[19:10] is the first 10-bit character.
// From the specification: the rows and fields named in the frame table
// (reset count in rows 1-2, CONVERT count, error bits, 32-bit timestamp,
// WIB header per COLDATA block, ChkSm A/B, CRC-32 trailer, K28.2/K28.1
// idles), the unaltered COLDATA payload and the test-pattern mode. This
// design's choices: the contents of rows 0-1, the block length of 55 words
// (derived from the 123-row frame), the checksum rule, the error-bit layout
// and the pattern.
module wib_frame_tx
  import pdts_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 256
) (
  input  logic        clk,            // 250 MHz link word clock
  input  logic        rst,
  input  logic        convert_evt,    // one strobe per CONVERT (synchronized)
  input  logic        sync_evt,       // SYNC: clears the timestamp
  input  logic [15:0] convert_count,
  input  logic [23:0] reset_count,
  input  logic [4:0]  crate,
  input  logic [2:0]  slot,
  input  logic [1:0]  link,
  input  logic        test_mode,
  // COLDATA words from the front-end link
  input  logic        cd_valid,
  input  logic        cd_sof,         // first word (checksum word) of a block
  input  logic [15:0] cd_data,
  // to the serializer
  output logic [19:0] link_code,
  output logic [15:0] tx_word,        // word before 8b/10b (for monitoring)
  output logic [1:0]  tx_k,
  output logic        in_frame,
  // counters
  output logic [31:0] frames_sent,
  output logic [15:0] err_count,
  output logic [15:0] missing_count,
  output logic [15:0] overrun_count,
  output logic [15:0] fifo_overflow
);
  localparam int unsigned CD1_FIRST = HDR_WORDS + CDH_WORDS;            // 9
  localparam int unsigned CD2_HDR   = CD1_FIRST + CD_WORDS;             // 64
  localparam int unsigned CD2_FIRST = CD2_HDR + CDH_WORDS;              // 66
  localparam int unsigned CRC_ROW   = CD2_FIRST + CD_WORDS;             // 121
  localparam int unsigned FIFO_NEED = 2 * CD_WORDS;

  logic [6:0]  row;
  logic        active, tmode;
  logic [31:0] ts;
  logic        ts_ph;
  logic [15:0] tp_cnt;
  logic [7:0]  sum_a, sum_b, chk_a, chk_b;
  logic [1:0]  cs_err, sof_err;           // per block, current frame
  logic [1:0]  cs_err_q, sof_err_q;       // reported in the next frame
  logic        missing_q, overrun_q, ovf_q;
  logic [16:0] f_rdata;
  logic        f_rd;
  logic [$clog2(FIFO_DEPTH+1)-1:0] f_count;
  logic        in_cd, cd_first, cd_last, blk;
  logic [15:0] wd;
  logic [1:0]  kd;
  logic [31:0] crc;
  logic        crc_en, crc_clr;
  logic [9:0]  c_lo, c_hi;
  logic        rd_q, rd_mid, rd_nx;

  sync_fifo #(.WIDTH(17), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .wr_en(cd_valid), .wr_data({cd_sof, cd_data}), .rd_en(f_rd),
    .rd_data(f_rdata), .full(), .empty(), .count(f_count),
    .overflow_count(fifo_overflow));

  assign in_cd    = active && ((row >= 7'(CD1_FIRST) && row < 7'(CD2_HDR)) ||
                               (row >= 7'(CD2_FIRST) && row < 7'(CRC_ROW)));
  assign blk      = (row >= 7'(CD2_HDR));
  assign cd_first = (row == 7'(CD1_FIRST)) || (row == 7'(CD2_FIRST));
  assign cd_last  = (row == 7'(CD2_HDR - 1)) || (row == 7'(CRC_ROW - 1));
  assign f_rd     = in_cd && !tmode;
  assign crc_clr  = active && (row == 7'd0);
  assign crc_en   = active && (row >= 7'd1) && (row < 7'(CRC_ROW));

  crc32_d16 u_crc (.clk, .rst, .clear(crc_clr), .en(crc_en), .data(wd), .crc);

  // word of the current row
  always_comb begin
    kd = 2'b00;
    wd = 16'h0000;
    if (!active) begin
      wd = {K28_2, K28_1};
      kd = 2'b11;
    end else begin
      unique case (row)
        7'd0: begin wd = {crate, slot, K28_5}; kd = 2'b01; end
        7'd1: wd = {reset_count[7:0], FRAME_VERSION[3:0], 2'b00, link};
        7'd2: wd = reset_count[23:8];
        7'd3: wd = convert_count;
        7'd4: wd = {err_count[7:0], 1'b0, ovf_q, overrun_q, missing_q,
                    sof_err_q, cs_err_q};
        7'd5: wd = ts[15:0];
        7'd6: wd = ts[31:16];
        7'(HDR_WORDS):   wd = {14'd0, sof_err_q[0], cs_err_q[0]};
        7'(CD2_HDR):     wd = {14'd0, sof_err_q[1], cs_err_q[1]};
        7'(CRC_ROW):     wd = crc[15:0];
        7'(CRC_ROW + 1): wd = crc[31:16];
        default: wd = in_cd ? (tmode ? tp_cnt : f_rdata[15:0]) : 16'h0000;
      endcase
    end
  end

  // framing control
  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0; row <= '0; tmode <= 1'b0; tp_cnt <= '0;
      ts <= '0; ts_ph <= 1'b0;
      sum_a <= '0; sum_b <= '0; chk_a <= '0; chk_b <= '0;
      cs_err <= '0; sof_err <= '0; cs_err_q <= '0; sof_err_q <= '0;
      missing_q <= 1'b0; overrun_q <= 1'b0; ovf_q <= 1'b0;
      frames_sent <= '0; err_count <= '0; missing_count <= '0; overrun_count <= '0;
    end else begin
      // 125 MHz timestamp
      ts_ph <= ~ts_ph;
      if (sync_evt)   begin ts <= '0; ts_ph <= 1'b0; end
      else if (ts_ph) ts <= ts + 32'd1;
      if (fifo_overflow != 0) ovf_q <= 1'b1;

      if (convert_evt) begin
        if (active) begin
          overrun_q <= 1'b1;
          overrun_count <= overrun_count + 16'd1;
          err_count <= err_count + 16'd1;
        end else if (test_mode || f_count >= FIFO_NEED[$bits(f_count)-1:0]) begin
          active <= 1'b1;
          row    <= '0;
          tmode  <= test_mode;
        end else begin
          missing_q <= 1'b1;
          missing_count <= missing_count + 16'd1;
          err_count <= err_count + 16'd1;
        end
      end

      if (active) begin
        if (row == 7'(FRAME_WORDS - 1)) begin
          active <= 1'b0;
          row <= '0;
          frames_sent <= frames_sent + 32'd1;
          // this frame's findings go into the next header
          cs_err_q  <= cs_err;
          sof_err_q <= sof_err;
          if (cs_err != 0 || sof_err != 0) err_count <= err_count + 16'd1;
          missing_q <= 1'b0; overrun_q <= 1'b0;
        end else begin
          row <= row + 7'd1;
        end
        if (row == 7'd0) begin cs_err <= '0; sof_err <= '0; end
        if (in_cd) begin
          if (tmode) tp_cnt <= tp_cnt + 16'd1;
          if (cd_first) begin
            chk_a <= wd[7:0]; chk_b <= wd[15:8];
            sum_a <= '0; sum_b <= '0;
            if (!tmode && !f_rdata[16]) sof_err[blk] <= 1'b1;
          end else begin
            sum_a <= sum_a + wd[7:0];
            sum_b <= sum_b + wd[15:8];
          end
          if (cd_last && !tmode &&
              ((sum_a + wd[7:0]) != chk_a || (sum_b + wd[15:8]) != chk_b))
            cs_err[blk] <= 1'b1;
        end
      end
    end
  end

  // 8b/10b, low byte first, running disparity kept across words
  enc8b10b u_enc_lo (.data(wd[7:0]),  .k(kd[0]), .rd_in(rd_q),   .code(c_lo), .rd_out(rd_mid));
  enc8b10b u_enc_hi (.data(wd[15:8]), .k(kd[1]), .rd_in(rd_mid), .code(c_hi), .rd_out(rd_nx));

  always_ff @(posedge clk) begin
    if (rst) begin
      // an idle word, K28.1 at negative then K28.2 at positive disparity
      rd_q <= 1'b0; link_code <= {10'b0011111001, 10'b1100001010};
      tx_word <= {K28_2, K28_1}; tx_k <= 2'b11; in_frame <= 1'b0;
    end else begin
      rd_q      <= rd_nx;
      link_code <= {c_lo, c_hi};
      tx_word   <= wd;
      tx_k      <= kd;
      in_frame  <= active;
    end
  end

  // a frame never runs past its last row
  a_row_in_frame: assert property (@(posedge clk) disable iff (rst)
    active |-> (row < 7'(FRAME_WORDS)));
  // between frames only idle words {K28.2, K28.1} are sent
  a_idle_between_frames: assert property (@(posedge clk) disable iff (rst)
    !active |-> (wd == {K28_2, K28_1} && kd == 2'b11));
endmodule
