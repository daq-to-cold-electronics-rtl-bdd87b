// sync_fifo: single-clock first-in first-out buffer.
//
// Holds the COLDATA words that arrive from a front-end link until the WIB
// framer sends them in the frame of the next CONVERT. DEPTH entries of WIDTH
// bits in a memory array; wr_en is ignored when full, rd_en when empty.
// rd_data shows the oldest entry (first-word fall-through); rd_en removes it.
// count is the number of words held. Depth and flow control are this
// design's choices: the text only says the data are buffered and passed on
// unaltered.
module sync_fifo #(
  parameter int unsigned WIDTH = 17,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [15:0]              overflow_count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic do_wr, do_rd;

  assign full  = (count == DEPTH[$bits(count)-1:0]);
  assign empty = (count == 0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rd_data = mem[rp];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0; overflow_count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
      if (wr_en && full && overflow_count != 16'hFFFF) overflow_count <= overflow_count + 16'd1;
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (rst) rd_en |-> !empty);
endmodule
