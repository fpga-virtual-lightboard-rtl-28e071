// Virtual lightboard: a camera board that lets the user write in the air
// with a coloured glove, and a receiver board that shows the annotated video
// and plays the microphone audio, joined by a 100 Mb/s Ethernet link. The
// two PHYs and the cable are represented by a direct connection of the
// transmitter's RMII outputs to the receiver's RMII inputs; both boards run
// from the same 65 MHz and 50 MHz clocks here. PIXELS_PER_PACKET sets the
// packet size on both boards (one 320-pixel line by default).
module lightboard_top #(
  parameter int unsigned FRAME_W = 320,
  parameter int unsigned FRAME_H = 240,
  parameter int unsigned PIXELS_PER_PACKET = FRAME_W
) (
  input  logic        clk_65mhz,
  input  logic        clk_50mhz,
  input  logic        rst,
  input  logic        cam_pclk,
  input  logic        cam_vsync,
  input  logic        cam_href,
  input  logic [7:0]  cam_data,
  output logic        cam_xclk,
  input  logic [2:0]  sw,
  input  logic [3:0]  thresh_lower,
  input  logic [3:0]  thresh_upper,
  input  logic [7:0]  mic_sample,
  output logic [11:0] vga1_rgb,
  output logic        vga1_hs,
  output logic        vga1_vs,
  output logic [11:0] vga2_rgb,
  output logic        vga2_hs,
  output logic        vga2_vs,
  output logic        aud_pwm,
  output logic        fcs_done,
  output logic        fcs_ok,
  output logic        eth_txen,
  output logic [1:0]  eth_txd
);
  fpga1_top #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .PIXELS_PER_PACKET(PIXELS_PER_PACKET)) u_tx (.clk_65mhz, .eth_refclk(clk_50mhz), .rst, .cam_pclk, .cam_vsync, .cam_href,
                  .cam_data, .cam_xclk, .sw, .thresh_lower, .thresh_upper, .vol_data(mic_sample),
                  .vga_rgb(vga1_rgb), .vga_hs(vga1_hs), .vga_vs(vga1_vs),
                  .phy_txen(eth_txen), .phy_txd(eth_txd));
  fpga2_top #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .PIXELS_PER_PACKET(PIXELS_PER_PACKET)) u_rx (.clk_65mhz, .eth_refclk(clk_50mhz), .rst, .crs_dv(eth_txen), .rxd(eth_txd),
                  .vga_rgb(vga2_rgb), .vga_hs(vga2_hs), .vga_vs(vga2_vs), .aud_pwm,
                  .fcs_done, .fcs_ok);
endmodule
