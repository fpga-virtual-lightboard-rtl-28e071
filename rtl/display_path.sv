// Monitor side of one board: vga timing -> mirror (frame address) -> frame
// buffer port B (outside this module, two-cycle latency) -> scale (window)
// -> vga_mux (colours). Screen position and syncs are delayed to stay in
// step with the pixel: address 1 cycle, RAM 2 cycles, scale 1, mux 1, so
// rgb/hsync/vsync leave 5 cycles after the vga counters. The chain of four
// modules follows the design; the delay bookkeeping is this design's own.
module display_path #(
  parameter bit SHOW_TAGS = 1'b1
) (
  input  logic        clk,
  input  logic        rst,
  output logic [16:0] pixel_addr,
  input  logic [7:0]  frame_pixel,
  output logic [11:0] rgb,
  output logic        hsync,
  output logic        vsync
);
  logic [10:0] hcount, h3;
  logic [9:0]  vcount, v3;
  logic        hs, vs, bl, hs4, vs4, bl4;
  logic [7:0]  scaled_pixel;

  vga u_vga (.clk, .rst, .hcount, .vcount, .hsync(hs), .vsync(vs), .blank(bl));
  mirror u_mirror (.clk, .hcount, .vcount, .pixel_addr);
  delay_line #(.WIDTH(21), .DEPTH(3)) u_dpos (.clk, .d({hcount, vcount}), .q({h3, v3}));
  scale u_scale (.clk, .hcount(h3), .vcount(v3), .frame_pixel, .scaled_pixel);
  delay_line #(.WIDTH(3), .DEPTH(4)) u_dsync (.clk, .d({hs, vs, bl}), .q({hs4, vs4, bl4}));
  vga_mux #(.SHOW_TAGS(SHOW_TAGS)) u_mux (.clk, .pixel(scaled_pixel), .hsync_in(hs4),
                                         .vsync_in(vs4), .blank_in(bl4), .rgb, .hsync, .vsync);
endmodule
