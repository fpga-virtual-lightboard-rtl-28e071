// Shared constants and types of the virtual lightboard.
// The stored frame is 320x240 pixels of 8 bits. The two upper bits of a
// stored pixel say what it is: 11 = ink (the next two bits pick the colour),
// 00 = plain grey, 10 = grey under the colour threshold, 01 = grey on the
// crosshair. The lower six bits of a grey pixel are the upper six bits of Y.
// These encodings follow the design; the colour order is this design's choice.
package lb_pkg;
  localparam int unsigned FRAME_W   = 320;
  localparam int unsigned FRAME_H   = 240;
  localparam int unsigned FRAME_PIX = FRAME_W * FRAME_H;   // 76800
  localparam int unsigned ADDR_W    = 17;                  // $clog2(76800)

  typedef logic [ADDR_W-1:0] paddr_t;

  typedef enum logic [1:0] {
    TAG_GREY      = 2'b00,
    TAG_CROSSHAIR = 2'b01,
    TAG_THRESHOLD = 2'b10,
    TAG_INK       = 2'b11
  } pix_tag_e;

  typedef enum logic [1:0] {
    INK_YELLOW = 2'b00,
    INK_PINK   = 2'b01,
    INK_GREEN  = 2'b10,
    INK_RED    = 2'b11
  } ink_e;

  // Ink pixel: 11, colour, 0000 (11000000 yellow ... 11110000 red).
  function automatic logic [7:0] ink_pixel(ink_e c);
    return {TAG_INK, c, 4'b0000};
  endfunction

  function automatic logic [7:0] tag_pixel(pix_tag_e t, logic [5:0] y6);
    return {t, y6};
  endfunction

  // Ethernet framing used by the link.
  localparam logic [47:0] BROADCAST_MAC = 48'hFF_FF_FF_FF_FF_FF;
  localparam logic [31:0] CRC_RESIDUE   = 32'hC704_DD7B;
endpackage
