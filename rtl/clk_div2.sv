// clk_div2: divide-by-two of the recovered half-cell clock (100 MHz) to the
// 50 MHz system clock sent to the front ends, kept in phase with the bit cell.
//
// clk_out toggles every cycle. When the decoder is locked, cell_start marks
// the cycles that begin a bit cell; clk_out must then rise in the following
// cycle (be low while cell_start is high). If it is found in the wrong phase,
// the divider holds one cycle to slip into phase and counts the slip in
// slip_count. Dividing the clock by two comes from the specification; the
// phase rule and the slip counter are this design's choices.
module clk_div2 (
  input  logic       clk,
  input  logic       rst,
  input  logic       locked,
  input  logic       cell_start,
  output logic       clk_out,
  output logic [7:0] slip_count
);
  always_ff @(posedge clk) begin
    if (rst) begin
      clk_out    <= 1'b0;
      slip_count <= '0;
    end else if (locked && cell_start && clk_out) begin
      clk_out <= 1'b1;                    // hold high one more cycle: slip
      if (slip_count != 8'hFF) slip_count <= slip_count + 8'd1;
    end else begin
      clk_out <= ~clk_out;
    end
  end
endmodule
