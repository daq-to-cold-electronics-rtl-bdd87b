// rce_frame_rx: RCE side of one WIB-to-RCE data link.
//
// Each cycle one 20-bit code word (two 8b/10b characters, low byte first, as
// sent by wib_frame_tx) is decoded by two chained dec8b10b with the running
// disparity kept across words. A word whose low byte is the K28.5 comma
// starts a frame; the following 122 words are numbered as rows 1..122 and
// passed on (rx_valid, rx_row, rx_word) to the event buffer. The CRC-32 of
// rows 1..120 is compared with rows 121-122. A control character inside a
// frame ends it early (counted as a truncated frame). Counters, readable by
// slow control: good frames, CRC errors, truncated frames, 8b/10b code and
// disparity errors, idle words, and CONVERT-count gaps between consecutive
// frames (a frame that never arrived). The last frame's CONVERT count,
// timestamp and error bits are held for monitoring.
// Error checking at the RCE follows the specification; the counter set and
// frame-delineation rules are this design's choices.
module rce_frame_rx
  import pdts_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [19:0] link_code,
  output logic        rx_valid,
  output logic [6:0]  rx_row,
  output logic [15:0] rx_word,
  output logic        frame_ok,         // strobe: a frame with a good CRC ended
  output logic [31:0] good_frames,
  output logic [15:0] crc_errors,
  output logic [15:0] trunc_frames,
  output logic [15:0] code_errors,
  output logic [15:0] disp_errors,
  output logic [31:0] idle_words,
  output logic [15:0] convert_gaps,
  output logic [15:0] last_convert,
  output logic [31:0] last_timestamp,
  output logic [15:0] last_err_bits
);
  localparam int unsigned CRC_ROW = FRAME_WORDS - 2;   // 121

  logic [7:0] d_lo, d_hi;
  logic k_lo, k_hi, ce_lo, ce_hi, de_lo, de_hi, rd_q, rd_mid, rd_nx;
  logic [15:0] w;
  logic sof, any_k, in_fr, seen_frame;
  logic [6:0] row;
  logic [31:0] crc;
  logic [15:0] crc_lo, conv_cur;
  logic [15:0] ts_lo;

  dec8b10b u_dec_lo (.code(link_code[19:10]), .rd_in(rd_q), .data(d_lo), .k(k_lo),
                     .rd_out(rd_mid), .code_err(ce_lo), .disp_err(de_lo));
  dec8b10b u_dec_hi (.code(link_code[9:0]), .rd_in(rd_mid), .data(d_hi), .k(k_hi),
                     .rd_out(rd_nx), .code_err(ce_hi), .disp_err(de_hi));

  assign w     = {d_hi, d_lo};
  assign sof   = k_lo && d_lo == K28_5 && !ce_lo;
  assign any_k = k_lo || k_hi;

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_q <= 1'b0; in_fr <= 1'b0; row <= '0; crc <= CRC_INIT; crc_lo <= '0;
      rx_valid <= 1'b0; rx_row <= '0; rx_word <= '0; frame_ok <= 1'b0;
      good_frames <= '0; crc_errors <= '0; trunc_frames <= '0; code_errors <= '0;
      disp_errors <= '0; idle_words <= '0; convert_gaps <= '0; seen_frame <= 1'b0;
      conv_cur <= '0; last_convert <= '0; last_timestamp <= '0; last_err_bits <= '0;
      ts_lo <= '0;
    end else begin
      rd_q <= rd_nx;
      rx_valid <= 1'b0;
      frame_ok <= 1'b0;
      if ((ce_lo || ce_hi) && code_errors != 16'hFFFF) code_errors <= code_errors + 16'd1;
      if ((de_lo || de_hi) && disp_errors != 16'hFFFF) disp_errors <= disp_errors + 16'd1;
      if (sof) begin
        if (in_fr) trunc_frames <= trunc_frames + 16'd1;
        in_fr <= 1'b1;
        row   <= 7'd1;
        crc   <= CRC_INIT;
      end else if (in_fr) begin
        if (any_k) begin
          in_fr <= 1'b0;
          trunc_frames <= trunc_frames + 16'd1;
          if (k_lo && k_hi) idle_words <= idle_words + 32'd1;
        end else begin
          rx_valid <= 1'b1;
          rx_row   <= row;
          rx_word  <= w;
          row <= row + 7'd1;
          if (row < 7'(CRC_ROW)) crc <= crc32_step16(crc, w);
          case (row)
            7'd3: conv_cur <= w;
            7'd4: last_err_bits <= w;
            7'd5: ts_lo <= w;
            7'd6: last_timestamp <= {w, ts_lo};
            default: ;
          endcase
          if (row == 7'(CRC_ROW)) crc_lo <= w;
          if (row == 7'(CRC_ROW + 1)) begin
            in_fr <= 1'b0;
            if ({w, crc_lo} == crc) begin
              good_frames <= good_frames + 32'd1;
              frame_ok <= 1'b1;
              if (seen_frame && conv_cur != last_convert + 16'd1 && conv_cur != 16'd1)
                convert_gaps <= convert_gaps + 16'd1;
              seen_frame   <= 1'b1;
              last_convert <= conv_cur;
            end else begin
              crc_errors <= crc_errors + 16'd1;
            end
          end
        end
      end else if (k_lo && k_hi) begin
        idle_words <= idle_words + 32'd1;
      end
    end
  end

  // rows passed on are the 122 rows that follow the comma row
  a_rx_row_range: assert property (@(posedge clk) disable iff (rst)
    rx_valid |-> (rx_row >= 7'd1 && rx_row < 7'(FRAME_WORDS)));
endmodule
