// timing_endpoint: timing-system receiver of one readout element (a WIB, or
// the DTM of an RCE crate) with its return-path transmitter.
//
// Downstream: the biphase-mark stream from the clock/data recovery device is
// decoded (bmc_decoder), the recovered clock is divided by two into the
// 50 MHz system clock in phase with the bit cell (clk_div2), and the 25-bit
// command words are aligned and decoded (cmd_word_rx). The aligner is held in
// reset while the decoder is not locked. Every good word is presented on
// cmd_valid/cmd for one cycle.
//
// Return path: the endpoint keeps its own CONVERT count (cleared by SYNC, as
// in convert_gen). When a downstream word carries an addressed byte equal to
// my_addr, the endpoint latches its count, turns its driver on and sends
// RESP_WORDS return words carrying that count, then turns the driver off, so
// several endpoints can share one return fibre. The timing master compares
// the echo with its own count: this is how it verifies that the endpoints
// are synchronized. The shared return path with a driver disable and its use
// for checking synchronization follow the specification; the polling scheme,
// the burst length and the return word layout are this design's choices.
module timing_endpoint
  import pdts_pkg::*;
#(
  parameter int unsigned RESP_WORDS = 5,
  parameter int unsigned LOCK_CELLS = 16
) (
  input  logic         clk,          // recovered half-cell clock
  input  logic         rst,
  input  logic         line_in,
  input  logic [7:0]   my_addr,
  output logic         locked,
  output logic         aligned,
  output logic         clk50,
  output logic         cmd_valid,
  output cmd_payload_t cmd,
  output logic [15:0]  convert_count,
  output logic [15:0]  viol_count,
  output logic [15:0]  word_err_count,
  output logic [7:0]   slip_count,
  output logic         ret_line,
  output logic         ret_oe
);
  localparam int unsigned BURST_CYCLES = RESP_WORDS * 2 * WORD_BITS;

  logic bit_valid, bit_d, cell_start;
  logic [PAYLOAD_BITS-1:0] pl;
  logic [15:0] count_next, echo;
  logic [$clog2(BURST_CYCLES+1)-1:0] burst;
  logic tx_on, tx_bit_req, tx_bit;
  ret_payload_t rp;

  bmc_decoder #(.LOCK_CELLS(LOCK_CELLS)) u_dec (
    .clk, .rst, .line_in, .bit_valid, .bit_out(bit_d), .cell_start,
    .locked, .viol_count);

  clk_div2 u_div (.clk, .rst, .locked, .cell_start, .clk_out(clk50), .slip_count);

  cmd_word_rx u_rx (
    .clk, .rst(rst || !locked), .bit_valid, .bit_in(bit_d), .aligned,
    .word_valid(cmd_valid), .payload(pl), .err_count(word_err_count));

  assign cmd = cmd_payload_t'(pl);

  always_comb begin
    count_next = convert_count;
    if (cmd.sync)         count_next = {15'd0, cmd.convert};
    else if (cmd.convert) count_next = convert_count + 16'd1;
  end

  assign tx_on = (burst != 0);

  always_ff @(posedge clk) begin
    if (rst) begin
      convert_count <= '0;
      echo  <= '0;
      burst <= '0;
    end else begin
      if (burst != 0) burst <= burst - 1'b1;
      if (cmd_valid) begin
        convert_count <= count_next;
        if (cmd.addr_valid && cmd.addr == my_addr && burst == 0) begin
          echo  <= count_next;
          burst <= BURST_CYCLES[$bits(burst)-1:0];
        end
      end
    end
  end

  // while idle the serializer preloads its first word from the count being
  // latched, so the first word of a burst already carries the echo
  assign rp = '{convert_count: tx_on ? echo : count_next, aligned: aligned, rsvd: 2'b00};

  cmd_word_tx u_rtx (
    .clk, .rst(rst || !tx_on), .bit_req(tx_bit_req), .payload_in(rp),
    .load(), .bit_out(tx_bit));

  bmc_encoder u_renc (
    .clk, .rst, .tx_en(tx_on), .bit_in(tx_bit), .bit_req(tx_bit_req),
    .line(ret_line), .line_oe(ret_oe));
endmodule
