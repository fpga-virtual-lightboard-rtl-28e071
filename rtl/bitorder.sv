// Byte bit-order flip for the receiver. Ethernet sends each byte least
// significant bit first, so the dibits of a byte arrive as {b1,b0}, {b3,b2},
// {b5,b4}, {b7,b6}. This module collects four dibits and sends them back out
// as {b7,b6}, {b5,b4}, {b3,b2}, {b1,b0}, so later stages can shift bytes in
// most significant bit first. The byte leaves during the four cycles after
// its last dibit arrived (latency 4 cycles per dibit, one byte of storage
// while the next byte is collected). A trailing partial byte is dropped.
module bitorder (
  input  logic       clk,
  input  logic       rst,
  input  logic       axiiv,
  input  logic [1:0] axiid,
  output logic       axiov,
  output logic [1:0] axiod
);
  logic [5:0] acc;
  logic [1:0] ic;
  logic [7:0] ob;
  logic [2:0] oc;

  assign axiov = (oc != 3'd0);
  assign axiod = ob[7:6];

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0;
      ic  <= '0;
      ob  <= '0;
      oc  <= '0;
    end else begin
      if (oc != 3'd0) begin
        ob <= {ob[5:0], 2'b00};
        oc <= oc - 3'd1;
      end
      if (!axiiv) begin
        ic <= '0;
      end else begin
        ic  <= ic + 2'd1;
        acc <= {axiid, acc[5:2]};
        if (ic == 2'd3) begin
          ob <= {axiid, acc};
          oc <= 3'd4;
        end
      end
    end
  end
endmodule
