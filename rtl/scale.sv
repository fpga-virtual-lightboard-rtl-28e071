// Display window. A pixel read from the frame buffer is passed on when the
// (delayed) screen position lies inside the DISP_W x DISP_H window, else a
// black pixel (8'h00, grey with Y = 0) is sent. One register stage.
// hcount/vcount must be delayed to match the address-to-data latency.
// The pass/black rule follows the design; the window size (the whole
// 1024x768 screen, which 5/16 maps exactly onto the frame) is derived.
module scale #(
  parameter int unsigned DISP_W = 1024,
  parameter int unsigned DISP_H = 768
) (
  input  logic        clk,
  input  logic [10:0] hcount,
  input  logic [9:0]  vcount,
  input  logic [7:0]  frame_pixel,
  output logic [7:0]  scaled_pixel
);
  always_ff @(posedge clk) begin
    if (hcount < 11'(DISP_W) && vcount < 10'(DISP_H)) scaled_pixel <= frame_pixel;
    else                                              scaled_pixel <= 8'h00;
  end
endmodule
