// Receiver board. RMII dibits from the PHY lose their preamble (ether_rx);
// the raw frame is checked against its FCS (fcs_check), and in parallel
// reordered to most-significant-bit-first (bitorder), stripped of its MAC
// header (firewall) and split into address, pixels and audio
// (image_audio_split). frame_packaging turns address and pixel count into
// writes to the 320x240 frame buffer (50 MHz port), which the monitor side
// reads on 65 MHz, showing tags as plain grey. The audio byte drives the
// PWM output. fcs_done/fcs_ok report each frame's check. PIXELS_PER_PACKET
// must match the transmitter's.
module fpga2_top #(
  parameter int unsigned FRAME_W = 320,
  parameter int unsigned FRAME_H = 240,
  parameter int unsigned PIXELS_PER_PACKET = FRAME_W
) (
  input  logic        clk_65mhz,
  input  logic        eth_refclk,
  input  logic        rst,
  input  logic        crs_dv,
  input  logic [1:0]  rxd,
  output logic [11:0] vga_rgb,
  output logic        vga_hs,
  output logic        vga_vs,
  output logic        aud_pwm,
  output logic        fcs_done,
  output logic        fcs_ok
);
  localparam int unsigned DEPTH = FRAME_W * FRAME_H;

  logic       ev, bv, fv;
  logic [1:0] ed, bd, fd;
  ether_rx  u_ether (.clk(eth_refclk), .rst, .crs_dv, .rxd, .axiov(ev), .axiod(ed));
  fcs_check u_fcs   (.clk(eth_refclk), .rst, .axiiv(ev), .axiid(ed), .done(fcs_done), .ok(fcs_ok));
  bitorder  u_bits  (.clk(eth_refclk), .rst, .axiiv(ev), .axiid(ed), .axiov(bv), .axiod(bd));
  firewall  u_fw    (.clk(eth_refclk), .rst, .axiiv(bv), .axiid(bd), .axiov(fv), .axiod(fd));

  logic [23:0] addr;
  logic        valid_addr, valid_pixel, audio_valid;
  logic [7:0]  pixel, audio;
  image_audio_split #(.PIXELS(PIXELS_PER_PACKET)) u_split (.clk(eth_refclk), .rst, .axiiv(fv), .axiid(fd),
                   .addr, .valid_addr, .pixel, .valid_pixel, .audio, .audio_valid);

  logic [16:0] pixel_in_addr, pixel_out_addr;
  logic        valid_pixel_in;
  logic [7:0]  pixel_in, pixel_out, unused_douta;
  frame_packaging #(.DEPTH(DEPTH)) u_pack (.clk(eth_refclk), .rst, .addr, .valid_addr, .pixel,
                   .valid_pixel, .pixel_in_addr, .valid_pixel_in, .pixel_out(pixel_in));

  pixel_bram #(.DEPTH(DEPTH), .AW(17)) u_bram (
    .clka(eth_refclk), .wea(valid_pixel_in), .addra(pixel_in_addr), .dina(pixel_in), .douta(unused_douta),
    .clkb(clk_65mhz), .addrb(pixel_out_addr), .doutb(pixel_out));

  display_path #(.SHOW_TAGS(1'b0)) u_display (.clk(clk_65mhz), .rst, .pixel_addr(pixel_out_addr),
                   .frame_pixel(pixel_out), .rgb(vga_rgb), .hsync(vga_hs), .vsync(vga_vs));

  audio_pwm u_audio (.clk(eth_refclk), .rst, .sample(audio), .sample_valid(audio_valid), .pwm(aud_pwm));
endmodule
