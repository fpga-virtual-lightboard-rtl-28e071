// MAC header filter. Input is the frame from the destination address on, in
// most-significant-bit-first dibits. The first 24 dibits (destination MAC)
// are collected; the frame is accepted when it is the broadcast address or
// MY_MAC. The 56 dibits of the 14-byte header (destination, source, length)
// are removed, and the rest of an accepted frame (payload and FCS) leaves on
// axiov/axiod one cycle later. Frames for other stations produce nothing.
// The broadcast address follows the design; the filter itself is inferred
// from the block's name.
module firewall
  import lb_pkg::*;
#(
  parameter logic [47:0] MY_MAC = 48'h02_00_00_00_00_02
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       axiiv,
  input  logic [1:0] axiid,
  output logic       axiov,
  output logic [1:0] axiod
);
  logic [47:0] dest;
  logic [5:0]  cnt;
  logic        match;

  assign match = (dest == BROADCAST_MAC) || (dest == MY_MAC);

  always_ff @(posedge clk) begin
    if (rst) begin
      dest  <= '0;
      cnt   <= '0;
      axiov <= 1'b0;
      axiod <= 2'b00;
    end else begin
      axiov <= 1'b0;
      axiod <= axiid;
      if (!axiiv) begin
        cnt <= '0;
      end else begin
        if (cnt < 6'd24) dest <= {dest[45:0], axiid};
        if (cnt < 6'd56) cnt <= cnt + 6'd1;
        else             axiov <= match;
      end
    end
  end
endmodule
