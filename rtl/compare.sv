// Pixel manager of the transmitter. It decides, pixel by pixel, what goes
// into the frame buffers so that ink survives from frame to frame.
// A camera pixel arrives every 8 cycles, so the module runs an 8-state cycle:
//   state 0  wait for data_valid; latch y, mask and position, present the
//            read address vcount*FRAME_W+hcount (pixel_valid low)
//   state 3  the stored pixel (current_pixel) is back, two cycles after the
//            address; decide the new value
//   state 4  pixel_valid high for one cycle with pixel_addr and pixel
// Decision (sw[0]=0 write, 1 erase; sw[2:1] ink colour):
//   erase mode and mask            -> threshold-tagged grey (removes ink)
//   stored pixel is ink (MSBs 11)  -> nothing written
//   write mode, within one pixel of the centre of mass -> ink
//   on the centre's row or column  -> crosshair-tagged grey
//   mask                           -> threshold-tagged grey
//   otherwise                      -> plain grey
// The 8-state cycle, the two-cycle read, the keep-ink rule and the 3x3 brush
// follow the design; the crosshair shape, the tag priority, the switch
// polarity and the colour order are this design's choices.
module compare
  import lb_pkg::pix_tag_e, lb_pkg::TAG_GREY, lb_pkg::TAG_CROSSHAIR, lb_pkg::TAG_THRESHOLD,
         lb_pkg::TAG_INK, lb_pkg::ink_e, lb_pkg::ink_pixel, lb_pkg::tag_pixel;
#(
  parameter int unsigned FRAME_W = 320
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        valid,          // new centre of mass
  input  logic [8:0]  x_com,
  input  logic [7:0]  y_com,
  input  logic [2:0]  sw,
  input  logic [5:0]  y,
  input  logic        mask,
  input  logic        data_valid,     // new camera pixel
  input  logic [8:0]  hcount_rec,
  input  logic [7:0]  vcount_rec,
  input  logic [7:0]  current_pixel,
  output logic        pixel_valid,
  output logic [16:0] pixel_addr,
  output logic [7:0]  pixel
);
  logic [2:0] st;
  logic [8:0] xc, hc;
  logic [7:0] yc, vc;
  logic       have_com;
  logic [5:0] y_l;
  logic       mask_l;
  logic       near, on_cross, erase, wr;
  logic [7:0] newpix;

  // centre of mass register
  always_ff @(posedge clk) begin
    if (rst) begin
      xc <= '0;
      yc <= '0;
      have_com <= 1'b0;
    end else if (valid) begin
      xc <= x_com;
      yc <= y_com;
      have_com <= 1'b1;
    end
  end

  always_comb begin
    near  = have_com &&
            ((hc >= xc) ? (hc - xc) <= 9'd1 : (xc - hc) <= 9'd1) &&
            ((vc >= yc) ? (vc - yc) <= 8'd1 : (yc - vc) <= 8'd1);
    on_cross = have_com && ((hc == xc) || (vc == yc));
    erase = sw[0];
    wr    = 1'b1;
    if (erase && mask_l)                       newpix = tag_pixel(TAG_THRESHOLD, y_l);
    else if (current_pixel[7:6] == TAG_INK) begin
      newpix = current_pixel;
      wr     = 1'b0;
    end
    else if (!erase && near)                   newpix = ink_pixel(ink_e'(sw[2:1]));
    else if (on_cross)                            newpix = tag_pixel(TAG_CROSSHAIR, y_l);
    else if (mask_l)                           newpix = tag_pixel(TAG_THRESHOLD, y_l);
    else                                       newpix = tag_pixel(TAG_GREY, y_l);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st          <= '0;
      hc          <= '0;
      vc          <= '0;
      y_l         <= '0;
      mask_l      <= 1'b0;
      pixel_valid <= 1'b0;
      pixel_addr  <= '0;
      pixel       <= '0;
    end else begin
      pixel_valid <= 1'b0;
      case (st)
        3'd0: if (data_valid) begin
          hc         <= hcount_rec;
          vc         <= vcount_rec;
          y_l        <= y;
          mask_l     <= mask;
          pixel_addr <= 17'(vcount_rec * FRAME_W + hcount_rec);
          st         <= 3'd1;
        end
        3'd3: begin
          pixel       <= newpix;
          pixel_valid <= wr;
          st          <= 3'd4;
        end
        default: st <= st + 3'd1;   // 1,2,4,5,6,7 -> wraps to 0
      endcase
    end
  end
endmodule
