// Screen position to frame-buffer address. The 1024x768 screen shows the
// 320x240 frame enlarged by 16/5, mirrored left to right so the user sees
// themself as in a mirror:
//   col  = FRAME_W-1 - (hcount*5 >> 4),  row = vcount*5 >> 4
//   addr = row*FRAME_W + col
// Outside the visible area the address is 0. One register stage.
// The 5/16 scale and the mirroring follow the design; the address is 17
// bits wide because 76800 pixels need 17.
module mirror #(
  parameter int unsigned FRAME_W  = 320,
  parameter int unsigned FRAME_H  = 240
) (
  input  logic        clk,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  output logic [16:0] pixel_addr
);
  logic [13:0] hs;
  logic [13:0] vs;
  always_comb begin
    hs = (14'(hcount) * 14'd5) >> 4;
    vs = (14'(vcount) * 14'd5) >> 4;
  end

  always_ff @(posedge clk) begin
    if (hs < 14'(FRAME_W) && vs < 14'(FRAME_H))
      pixel_addr <= 17'(vs * 14'(FRAME_W)) + 17'(14'(FRAME_W - 1) - hs);
    else
      pixel_addr <= '0;
  end
endmodule
