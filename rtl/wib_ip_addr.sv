// wib_ip_addr: UDP slow-control IP address of a WIB.
//
// Every WIB needs a unique address, formed from the crate address (set with
// dip switches on the Power and Timing Card) and the slot address given by
// the backplane slot, numbered 1 to 5. The address is
// {IP_PREFIX, crate, slot}, registered; slot 0 or a slot above NSLOTS is not
// a valid backplane position and clears ip_valid. The address layout and the
// prefix are this design's choices; the text only says the address is
// derived from crate and slot.
module wib_ip_addr #(
  parameter logic [15:0] IP_PREFIX = 16'hC0A8,   // 192.168.x.x
  parameter int unsigned NSLOTS    = 5
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  crate,
  input  logic [2:0]  slot,
  output logic [31:0] ip,
  output logic        ip_valid
);
  always_ff @(posedge clk) begin
    if (rst) begin
      ip <= '0;
      ip_valid <= 1'b0;
    end else begin
      ip_valid <= (slot != 3'd0) && (slot <= 3'(NSLOTS));
      ip <= {IP_PREFIX, crate, 5'd0, slot};
    end
  end
endmodule
