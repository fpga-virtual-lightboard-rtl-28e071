// Stored pixel to 12-bit {R,G,B} for the monitor, with the syncs registered
// alongside. Ink pixels (11cc0000) show their colour: yellow, pink, green,
// red. Grey pixels show Y[5:2] on all three channels. With SHOW_TAGS = 1
// (transmitter) threshold-tagged pixels (10yyyyyy) are shown pink and
// crosshair pixels (01yyyyyy) green, so the user can see where the glove
// is; with SHOW_TAGS = 0 (receiver) they are shown as grey. During blank the
// output is black. One register stage.
// The encoding and the per-board difference follow the design; the exact
// RGB values are this design's choice.
module vga_mux
  import lb_pkg::*;
#(
  parameter bit SHOW_TAGS = 1'b1
) (
  input  logic        clk,
  input  logic [7:0]  pixel,
  input  logic        hsync_in,
  input  logic        vsync_in,
  input  logic        blank_in,
  output logic [11:0] rgb,
  output logic        hsync,
  output logic        vsync
);
  localparam logic [11:0] RGB_YELLOW = 12'hFF0;
  localparam logic [11:0] RGB_PINK   = 12'hF6B;
  localparam logic [11:0] RGB_GREEN  = 12'h0F0;
  localparam logic [11:0] RGB_RED    = 12'hF00;

  logic [11:0] c;
  logic [3:0]  g4;

  always_comb begin
    g4 = pixel[5:2];
    c  = {g4, g4, g4};
    case (pix_tag_e'(pixel[7:6]))
      TAG_INK: case (ink_e'(pixel[5:4]))
        INK_YELLOW: c = RGB_YELLOW;
        INK_PINK:   c = RGB_PINK;
        INK_GREEN:  c = RGB_GREEN;
        default:    c = RGB_RED;
      endcase
      TAG_THRESHOLD: if (SHOW_TAGS) c = RGB_PINK;
      TAG_CROSSHAIR: if (SHOW_TAGS) c = RGB_GREEN;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    rgb   <= blank_in ? 12'h000 : c;
    hsync <= hsync_in;
    vsync <= vsync_in;
  end
endmodule
