// bmc_decoder: biphase-mark decoder behind the clock/data recovery device.
//
// The recovered half-cell clock samples the line once per half-cell. A
// transition is seen at every cell boundary; a second transition inside the
// cell means 1. The decoder does not know which of the two half-cell phases is
// the boundary: it assumes one, and every time a boundary sample shows no
// transition it swaps phase and starts counting again. After LOCK_CELLS
// consecutive cells with a boundary transition it declares lock. While locked
// a missing boundary transition is a code violation (counted in viol_count);
// LOSS_CELLS consecutive violations drop lock.
//
// Outputs: bit_valid pulses once per cell (every second cycle) with the
// decoded bit in bit_out, two cycles after the cell's second half-cell was
// sampled. cell_start pulses in the cycle a new cell's first half-cell is
// sampled and is used to phase the divided-down 50 MHz clock.
// The lock thresholds and counters are this design's choices.
module bmc_decoder #(
  parameter int unsigned LOCK_CELLS = 16,
  parameter int unsigned LOSS_CELLS = 4
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        line_in,
  output logic        bit_valid,
  output logic        bit_out,
  output logic        cell_start,
  output logic        locked,
  output logic [15:0] viol_count
);
  logic line_q, line_qq;
  logic sel;        // cycle parity of the assumed boundary
  logic ph;         // free-running cycle parity
  logic [$clog2(LOCK_CELLS+1)-1:0] good;
  logic [$clog2(LOSS_CELLS+1)-1:0] bad;
  logic trans;

  assign trans      = line_q ^ line_qq;           // transition before sample line_q
  assign cell_start = (ph == sel);

  always_ff @(posedge clk) begin
    if (rst) begin
      line_q <= 1'b0; line_qq <= 1'b0;
      ph <= 1'b0; sel <= 1'b0;
      good <= '0; bad <= '0; locked <= 1'b0;
      bit_valid <= 1'b0; bit_out <= 1'b0;
      viol_count <= '0;
    end else begin
      line_q  <= line_in;
      line_qq <= line_q;
      ph      <= ~ph;
      bit_valid <= 1'b0;
      if (ph == sel) begin
        // line_q is the first half-cell of a cell: a transition must precede it
        if (!trans) begin
          if (locked) begin
            if (viol_count != 16'hFFFF) viol_count <= viol_count + 16'd1;
            if (bad == $bits(bad)'(LOSS_CELLS-1)) begin
              locked <= 1'b0; good <= '0; bad <= '0; sel <= ~sel;
            end else begin
              bad <= bad + 1'b1;
            end
          end else begin
            sel  <= ~sel;   // wrong phase: try the other one
            good <= '0;
          end
        end else begin
          bad <= '0;
          if (!locked) begin
            if (good == $bits(good)'(LOCK_CELLS-1)) locked <= 1'b1;
            else good <= good + 1'b1;
          end
        end
      end else begin
        // line_q is the second half-cell: a transition here is a 1
        bit_valid <= locked;
        bit_out   <= trans;
      end
    end
  end
endmodule
