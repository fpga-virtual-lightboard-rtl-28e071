// OV7670 capture. The camera is clocked by xclk = clk/4 (16.25 MHz from the
// 65 MHz video clock) and returns pclk, href, vsync and one byte per pclk.
// This module samples those pins in the clk domain through two-flop
// synchronisers, takes a byte on each rising pclk edge while href is high,
// and pairs two bytes (high byte first) into one RGB565 pixel. valid_pixel
// pulses for one clk cycle per pixel, so with pclk = clk/4 a pixel arrives
// every 8 clk cycles. frame_done pulses one cycle on the rising vsync edge.
// The byte pairing and frame flag follow the design; the synchroniser depth
// and byte order are this design's choices.
module camera (
  input  logic        clk,
  input  logic        rst,
  input  logic        cam_pclk,
  input  logic        vsync,
  input  logic        href,
  input  logic [7:0]  pixel,
  output logic        xclk,
  output logic [15:0] cam_pixel,
  output logic        valid_pixel,
  output logic        frame_done
);
  logic [1:0] xdiv;
  logic [2:0] pclk_s, vs_s;
  logic [1:0] href_s;
  logic [7:0] d_s1, d_s2;
  logic [7:0] hi_byte;
  logic       have_hi;

  always_ff @(posedge clk) begin
    if (rst) begin
      xdiv        <= '0;
      pclk_s      <= '0;
      vs_s        <= '0;
      href_s      <= '0;
      d_s1        <= '0;
      d_s2        <= '0;
      hi_byte     <= '0;
      have_hi     <= 1'b0;
      cam_pixel   <= '0;
      valid_pixel <= 1'b0;
      frame_done  <= 1'b0;
    end else begin
      xdiv        <= xdiv + 2'd1;
      pclk_s      <= {pclk_s[1:0], cam_pclk};
      vs_s        <= {vs_s[1:0], vsync};
      href_s      <= {href_s[0], href};
      d_s1        <= pixel;
      d_s2        <= d_s1;
      valid_pixel <= 1'b0;
      frame_done  <= vs_s[1] & ~vs_s[2];
      if (vs_s[1]) begin
        have_hi <= 1'b0;
      end else if (pclk_s[1] & ~pclk_s[2]) begin
        if (href_s[1]) begin
          if (!have_hi) begin
            hi_byte <= d_s2;
            have_hi <= 1'b1;
          end else begin
            cam_pixel   <= {hi_byte, d_s2};
            valid_pixel <= 1'b1;
            have_hi     <= 1'b0;
          end
        end else begin
          have_hi <= 1'b0;
        end
      end
    end
  end

  assign xclk = xdiv[1];
endmodule
