// Transmitter board. Camera pixels are located (recover), converted to
// YCrCb, and tagged when their Cr lies in the glove's colour range
// (threshold). The tagged pixels of each frame give the centre of mass of
// the fingertip; the compare stage paints ink there in write mode, or wipes
// it in erase mode, and writes every pixel into two identical 320x240 frame
// buffers: one feeds the local monitor (65 MHz), the other the Ethernet
// transmitter (50 MHz), which sends PIXELS_PER_PACKET pixels (one line by
// default) per packet with one audio sample (vol_data) appended.
// Clocks: clk_65mhz for capture, processing and display; eth_refclk (50 MHz)
// for Ethernet and audio. rst must be held for a few cycles of both clocks.
// The YCrCb result lags the position by 3 cycles and the mask by 4; the
// position and valid are delayed to match.
module fpga1_top #(
  parameter int unsigned FRAME_W = 320,
  parameter int unsigned FRAME_H = 240,
  parameter int unsigned PIXELS_PER_PACKET = FRAME_W
) (
  input  logic        clk_65mhz,
  input  logic        eth_refclk,
  input  logic        rst,
  input  logic        cam_pclk,
  input  logic        cam_vsync,
  input  logic        cam_href,
  input  logic [7:0]  cam_data,
  output logic        cam_xclk,
  input  logic [2:0]  sw,
  input  logic [3:0]  thresh_lower,
  input  logic [3:0]  thresh_upper,
  input  logic [7:0]  vol_data,
  output logic [11:0] vga_rgb,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        phy_txen,
  output logic [1:0]  phy_txd
);
  localparam int unsigned DEPTH = FRAME_W * FRAME_H;

  // capture
  logic [15:0] cam_pixel, pixel;
  logic        valid_pixel, frame_done, data_valid;
  logic [8:0]  hcount;
  logic [7:0]  vcount;

  camera u_camera (.clk(clk_65mhz), .rst, .cam_pclk, .vsync(cam_vsync), .href(cam_href),
                   .pixel(cam_data), .xclk(cam_xclk), .cam_pixel, .valid_pixel, .frame_done);
  recover #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H)) u_recover (.clk(clk_65mhz), .rst, .valid_pixel,
                   .cam_pixel, .frame_done, .pixel, .data_valid, .hcount, .vcount);

  // colour conversion and threshold
  logic [9:0] y, cr, cb, y4;
  logic       mask;
  rgb_to_ycrcb u_ycrcb (.clk(clk_65mhz),
                        .r({pixel[15:11], pixel[15:11]}),
                        .g({pixel[10:5], pixel[10:7]}),
                        .b({pixel[4:0], pixel[4:0]}),
                        .y, .cr, .cb);
  threshold u_threshold (.clk(clk_65mhz), .rst, .cr, .lower(thresh_lower), .upper(thresh_upper), .mask);

  logic       dv4, fd4;
  logic [8:0] h4;
  logic [7:0] v4;
  delay_line #(.WIDTH(19), .DEPTH(4)) u_dpix (.clk(clk_65mhz), .d({data_valid, frame_done, hcount, vcount}),
                                              .q({dv4, fd4, h4, v4}));
  delay_line #(.WIDTH(10), .DEPTH(1)) u_dy (.clk(clk_65mhz), .d(y), .q(y4));

  // centre of mass and pixel manager
  logic       com_valid;
  logic [8:0] x_com;
  logic [7:0] y_com;
  center_of_mass u_com (.clk(clk_65mhz), .rst, .x_in(h4), .y_in(v4), .valid_in(dv4 & mask),
                        .tabulate_in(fd4), .x_out(x_com), .y_out(y_com), .valid_out(com_valid));

  logic        wr_valid;
  logic [16:0] wr_addr;
  logic [7:0]  wr_pixel, current_pixel;
  compare #(.FRAME_W(FRAME_W)) u_compare (.clk(clk_65mhz), .rst, .valid(com_valid), .x_com, .y_com, .sw,
                       .y(y4[9:4]), .mask, .data_valid(dv4), .hcount_rec(h4), .vcount_rec(v4),
                       .current_pixel, .pixel_valid(wr_valid), .pixel_addr(wr_addr), .pixel(wr_pixel));

  // frame buffers
  logic [16:0] pixel_addr_vga, pixel_addr_rbo, pixel_addr_pkt;
  logic [7:0]  pixel_out_vga, pixel_out_rbo, unused_douta;
  pixel_bram #(.DEPTH(DEPTH), .AW(17)) frame_buffer_vga (
    .clka(clk_65mhz), .wea(wr_valid), .addra(wr_addr), .dina(wr_pixel), .douta(current_pixel),
    .clkb(clk_65mhz), .addrb(pixel_addr_vga), .doutb(pixel_out_vga));
  pixel_bram #(.DEPTH(DEPTH), .AW(17)) frame_buffer_ethernet (
    .clka(clk_65mhz), .wea(wr_valid), .addra(wr_addr), .dina(wr_pixel), .douta(unused_douta),
    .clkb(eth_refclk), .addrb(pixel_addr_rbo), .doutb(pixel_out_rbo));

  // local monitor
  display_path #(.SHOW_TAGS(1'b1)) u_display (.clk(clk_65mhz), .rst, .pixel_addr(pixel_addr_vga),
                   .frame_pixel(pixel_out_vga), .rgb(vga_rgb), .hsync(vga_hs), .vsync(vga_vs));

  // Ethernet transmitter
  logic       stall, pay_v;
  logic [1:0] pay_d;
  reverse_bit_order #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .PIXELS_PER_PACKET(PIXELS_PER_PACKET)) u_rbo (.clk(eth_refclk), .rst, .stall,
                   .vol_data, .pixel_out_rbo, .pixel_addr_rbo, .axiov(pay_v), .axiod(pay_d),
                   .pixel_addr(pixel_addr_pkt));
  eth_packer #(.PAYLOAD_BYTES(PIXELS_PER_PACKET + 1)) u_packer (.clk(eth_refclk), .rst, .axiov(pay_v),
                   .axiod(pay_d), .pixel_addr(pixel_addr_pkt), .stall, .phy_txen, .phy_txd);
endmodule
