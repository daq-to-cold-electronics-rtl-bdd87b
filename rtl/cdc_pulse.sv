// cdc_pulse: carries single-cycle strobes from one clock domain to another.
// Each source strobe flips a toggle; the destination synchronizes the toggle
// through two flip-flops and emits a one-cycle strobe on every change. Source
// strobes must be at least three destination cycles apart. Data that travel
// with the strobe (here the CONVERT and reset counts) are held stable in the
// source domain between strobes and may be sampled on dst_pulse.
module cdc_pulse (
  input  logic src_clk,
  input  logic src_rst,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst,
  output logic dst_pulse
);
  logic tog;
  logic [2:0] sync;

  always_ff @(posedge src_clk) begin
    if (src_rst)        tog <= 1'b0;
    else if (src_pulse) tog <= ~tog;
  end

  always_ff @(posedge dst_clk) begin
    if (dst_rst) sync <= '0;
    else         sync <= {sync[1:0], tog};
  end

  assign dst_pulse = sync[2] ^ sync[1];
endmodule
